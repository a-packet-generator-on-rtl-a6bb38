// tb_workload_replay_timing: repeatability of packet timing over repeated
// runs. The 43-frame, 25383-byte capture file (frame sizes made up as in
// tb_workload_pcap_replay) is loaded once into the PCAP queue of MAC 0 and
// replayed ten times, each run started by a rising edge of the global
// enable, with the delay module set to 1600 cycles (12.8 us) between packet
// starts. The MAC is modelled as a Gigabit transmitter (one byte per 8 ns).
// Every run must deliver the file intact; within each run the starts must be
// 1600 cycles apart to within one cycle; and the arrival time of every frame,
// counted from the first frame of its run, must be the same in all ten runs
// to within one cycle (8 ns).
module tb_workload_replay_timing;
  import pg_pkg::*;
  localparam int NFR = 43, TOTAL = 25383, RUNS = 10, DELAY = 1600;
  logic clk = 0, rst = 1;
  pkt_word_t mac_rx_word [NUM_MAC];
  logic mac_rx_valid [NUM_MAC], mac_rx_ready [NUM_MAC];
  pkt_word_t cpu_rx_word [NUM_MAC];
  logic cpu_rx_valid [NUM_MAC], cpu_rx_ready [NUM_MAC];
  pkt_word_t mac_tx_word [NUM_MAC];
  logic mac_tx_valid [NUM_MAC], mac_tx_ready [NUM_MAC];
  pkt_word_t cpu_tx_word [NUM_MAC];
  logic cpu_tx_valid [NUM_MAC], cpu_tx_ready [NUM_MAC];
  logic reg_req, reg_wr, reg_ack;
  logic [11:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  packet_generator_top dut (.*);

  int checks = 0, failures = 0;
  int sizes [NFR];
  pkt_word_t exp_mac [NUM_MAC][$];
  // transmitter model state
  int busy [NUM_MAC];
  longint first_cyc [NUM_MAC], last_cyc [NUM_MAC];
  longint bytes_out [NUM_MAC];
  int starved [NUM_MAC];
  bit running [NUM_MAC];
  longint cyc = 0;
  bit sop0 = 1;
  longint starts [$];
  longint ref_t [NFR];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int i = 0; i < NUM_MAC; i++) mac_tx_ready[i] = (busy[i] == 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NUM_MAC; i++) begin
      if (!rst && mac_tx_valid[i] && mac_tx_ready[i]) begin
        automatic int b = int'(mac_tx_word[i].nbytes_m1) + 1;
        if (exp_mac[i].size() == 0) check(0, $sformatf("unexpected word on MAC %0d", i));
        else begin
          automatic pkt_word_t e = exp_mac[i].pop_front();
          check(mac_tx_word[i] == e, $sformatf("MAC %0d got %h exp %h", i, mac_tx_word[i], e));
        end
        if (!running[i]) first_cyc[i] = cyc;
        if (i == 0 && sop0) starts.push_back(cyc);
        if (i == 0) sop0 = mac_tx_word[i].eop;
        running[i] = (exp_mac[i].size() != 0);
        last_cyc[i] = cyc + b;
        bytes_out[i] += b;
        busy[i] <= b - 1;
      end else begin
        if (running[i] && mac_tx_ready[i] && !mac_tx_valid[i]) starved[i]++;
        if (busy[i] > 0) busy[i] <= busy[i] - 1;
      end
    end
  end

  task automatic wr(input int a, input int d);
    @(negedge clk);
    reg_req = 1; reg_wr = 1; reg_addr = 12'(a); reg_wdata = 32'(d);
    @(negedge clk);
    reg_req = 0; reg_wr = 0;
  endtask

  task automatic rd(input int a, output int d);
    @(negedge clk);
    reg_req = 1; reg_wr = 0; reg_addr = 12'(a);
    @(negedge clk);
    reg_req = 0;
    d = int'(reg_rdata);
  endtask

  // The capture file for MAC i as packet words.
  function automatic void build_file(input int i);
    for (int f = 0; f < NFR; f++)
      for (int k = 0; k < (sizes[f] + 7) / 8; k++) begin
        automatic pkt_word_t t = '0;
        t.kind = W_DATA; t.eop = (k == (sizes[f] + 7) / 8 - 1);
        t.nbytes_m1 = t.eop ? 3'(sizes[f] - 8 * k - 1) : 3'd7;
        t.data = {8'(i), 24'(f), 32'(k) ^ 32'h5a5a_0000};
        file[i].push_back(t);
      end
  endfunction

  // Load it into the PCAP queue of MAC i through host port i.
  task automatic load(input int i, input pkt_word_t file [$]);
    foreach (file[k]) begin
      @(negedge clk);
      cpu_rx_word[i] = file[k]; cpu_rx_valid[i] = 1;
      #1;
      while (!cpu_rx_ready[i]) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    cpu_rx_valid[i] = 0;
  endtask

  pkt_word_t file [NUM_MAC][$];

  initial begin
    int sum = 0, extra, d;
    longint worst = 0;
    reg_req = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < NUM_MAC; i++) begin
      mac_rx_valid[i] = 0; cpu_rx_valid[i] = 0; mac_rx_word[i] = '0; cpu_rx_word[i] = '0;
      cpu_tx_ready[i] = 1; busy[i] = 0; running[i] = 0;
    end
    for (int f = 0; f < NFR - 1; f++) begin
      sizes[f] = 64 + (f * 379) % 1000;
      sum += sizes[f];
    end
    extra = (TOTAL - 600 - sum) / (NFR - 1);
    sum = 0;
    for (int f = 0; f < NFR - 1; f++) begin
      sizes[f] += extra;
      sum += sizes[f];
    end
    sizes[NFR - 1] = TOTAL - sum;
    repeat (3) @(negedge clk);
    rst = 0;
    wr(12'h001, 1);
    build_file(0);
    load(0, file[0]);
    repeat (200) @(negedge clk);
    wr(12'h001, 0);
    rd(12'h0A8, d);
    check(d == NFR, "file stored");
    wr(12'h050, 1);
    wr(12'h040, DELAY);
    wr(12'h048, 1);
    wr(12'h002, 1);
    for (int r = 0; r < RUNS; r++) begin
      starts.delete();
      foreach (file[0][k]) exp_mac[0].push_back(file[0][k]);
      running[0] = 0;
      wr(12'h000, 1);
      for (int c = 0; c < 200000 && exp_mac[0].size() != 0; c++) @(negedge clk);
      repeat (20) @(negedge clk);
      wr(12'h000, 0);
      check(exp_mac[0].size() == 0, $sformatf("run %0d complete", r));
      check(starts.size() == NFR, $sformatf("run %0d: %0d frames", r, starts.size()));
      for (int k = 1; k < starts.size(); k++)
        check(starts[k] - starts[k-1] >= DELAY - 1 && starts[k] - starts[k-1] <= DELAY + 1,
              $sformatf("run %0d gap %0d", r, starts[k] - starts[k-1]));
      for (int k = 0; k < starts.size() && k < NFR; k++) begin
        automatic longint t = starts[k] - starts[0];
        if (r == 0) ref_t[k] = t;
        else begin
          automatic longint dev = (t > ref_t[k]) ? t - ref_t[k] : ref_t[k] - t;
          if (dev > worst) worst = dev;
          check(dev <= 1, $sformatf("run %0d frame %0d off by %0d cycles", r, k, dev));
        end
      end
      repeat (2000) @(negedge clk);
    end
    $display("largest arrival-time difference between runs: %0d cycles (%0d ns)", worst, worst * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
