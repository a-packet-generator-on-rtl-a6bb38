// tb_workload_pcap_replay: the replay experiment of the packet generator.
// A capture file of 43 frames and 25383 bytes in total (frame sizes made up
// here between 64 and 1518 bytes, summing to 25383; the sizes are not
// known) is loaded into the PCAP
// queue of MAC 0, and for the second run also of MAC 1, and replayed twice
// with no rate limit or delay. Each MAC is modelled as a Gigabit Ethernet
// transmitter taking one byte per 8 ns clock: after a word of b bytes it is
// not ready for b-1 cycles. The frames must arrive intact and in order, and
// from the first to the last word the transmitter must never wait for data,
// i.e. the generator keeps the port at full line rate (1000 Mb/s of frame
// data) on one port and on two ports at once.
module tb_workload_pcap_replay;
  import pg_pkg::*;
  localparam int NFR = 43, TOTAL = 25383, ITER = 2;
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

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run(input int nports);
    int d;
    longint total;
    wr(12'h000, 0);
    wr(12'h003, 2);                       // empty all queues
    wr(12'h001, (1 << nports) - 1);       // load mode
    for (int i = 0; i < nports; i++) begin
      file[i].delete();
      build_file(i);
      load(i, file[i]);
    end
    repeat (200) @(negedge clk);
    wr(12'h001, 0);
    for (int i = 0; i < nports; i++) begin
      rd(12'h0A8 + i, d);
      check(d == NFR, $sformatf("%0d frames stored for MAC %0d", d, i));
      wr(12'h050 + i, ITER);
      for (int it = 0; it < ITER; it++) foreach (file[i][k]) exp_mac[i].push_back(file[i][k]);
      starved[i] = 0; bytes_out[i] = 0; running[i] = 0;
    end
    wr(12'h002, (1 << nports) - 1);
    wr(12'h000, 1);                       // start
    for (int c = 0; c < 300000; c++) begin
      automatic bit left = 0;
      for (int i = 0; i < nports; i++) if (exp_mac[i].size() != 0) left = 1;
      if (!left) break;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    for (int i = 0; i < nports; i++) begin
      total = last_cyc[i] - first_cyc[i];
      check(exp_mac[i].size() == 0, $sformatf("all frames sent on MAC %0d", i));
      check(bytes_out[i] == longint'(ITER) * TOTAL, $sformatf("bytes %0d", bytes_out[i]));
      check(starved[i] == 0, $sformatf("MAC %0d waited %0d cycles for data", i, starved[i]));
      // 1 byte per 8 ns cycle = 1000 Mb/s of frame data.
      $display("%0d port(s), MAC %0d: %0d bytes in %0d cycles = %0d Mb/s",
               nports, i, bytes_out[i], total, (bytes_out[i] * 1000) / total);
      check(bytes_out[i] * 1000 / total >= 999, "line rate");
      rd(12'h090 + i, d);
      check(d == ITER, "iterations done");
    end
    wr(12'h000, 0);
  endtask

  initial begin
    int sum = 0, extra;
    reg_req = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < NUM_MAC; i++) begin
      mac_rx_valid[i] = 0; cpu_rx_valid[i] = 0; mac_rx_word[i] = '0; cpu_rx_word[i] = '0;
      cpu_tx_ready[i] = 1; busy[i] = 0; running[i] = 0;
    end
    // Frame sizes: a spread between 64 and 1500 bytes; the last one makes
    // the total 25383.
    for (int f = 0; f < NFR - 1; f++) begin
      sizes[f] = 64 + (f * 379) % 1000;
      sum += sizes[f];
    end
    extra = (TOTAL - 600 - sum) / (NFR - 1);   // aim for a 600-byte last frame
    sum = 0;
    for (int f = 0; f < NFR - 1; f++) begin
      sizes[f] += extra;
      sum += sizes[f];
    end
    sizes[NFR - 1] = TOTAL - sum;
    check(sizes[NFR - 1] >= 64 && sizes[NFR - 1] <= 1518, $sformatf("last frame %0d bytes", sizes[NFR - 1]));
    repeat (3) @(negedge clk);
    rst = 0;
    run(1);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
