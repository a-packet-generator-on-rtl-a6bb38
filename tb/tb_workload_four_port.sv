// tb_workload_four_port: the heaviest load the packet generator is meant
// for, generation at line rate on all four Gigabit ports while capturing
// traffic on all four. Each PCAP queue is loaded with NFR full-size frames
// of 1518 bytes and replayed ITER times. During the replay each MAC receive
// port gets NRX full-size frames back to back, with capture on.
// Both MAC directions are modelled as Gigabit Ethernet at one byte per 8 ns
// clock. A frame takes 1518 cycles plus 20 cycles of preamble and
// inter-frame gap (this model's figure for the Ethernet overhead). The
// receive model produces a word every eighth byte and keeps it in a small
// backlog until the design takes it. The transmit model is not ready for b-1
// cycles after a word of b bytes, and 20 cycles more after a frame's last
// word.
// Checks:
//  - every replayed and every captured frame arrives intact and in order;
//  - no transmitter waits for data while a run is in progress (line rate);
//  - the receive backlog never exceeds BACKLOG_MAX words;
//  - captured timestamps are spaced exactly one frame time (1538 cycles =
//    12304 ns) apart, because nothing delays a frame before it is stamped;
//  - the capture and iteration counters read back right.
// The 1518-byte frames and the 20-cycle overhead are standard worst-case
// Ethernet figures chosen for this test; the frame counts are arbitrary.
module tb_workload_four_port;
  import pg_pkg::*;
  localparam int FLEN = 1518, GAP = 20, NFR = 8, ITER = 4, NRX = 32;
  localparam int WPF = (FLEN + 7) / 8;
  localparam int BACKLOG_MAX = 4;
  localparam longint FRAME_NS = longint'(FLEN + GAP) * 8;
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
  longint cyc = 0;
  bit go = 0;

  // transmit model
  pkt_word_t exp_mac [NUM_MAC][$];
  int busy [NUM_MAC];
  int starved [NUM_MAC];
  bit running [NUM_MAC];
  longint first_cyc [NUM_MAC], last_cyc [NUM_MAC], bytes_out [NUM_MAC];

  // receive model
  pkt_word_t rxq [NUM_MAC][$];
  pkt_word_t exp_cpu [NUM_MAC][$];
  int rx_f [NUM_MAC], rx_b [NUM_MAC], rx_gap [NUM_MAC], backlog_max [NUM_MAC];
  int n_ts [NUM_MAC], ts_bad [NUM_MAC];
  longint last_ts [NUM_MAC];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_word_t frame_word(input int tag, input int f, input int k);
    pkt_word_t t = '0;
    t.kind = W_DATA;
    t.eop = (k == WPF - 1);
    t.nbytes_m1 = t.eop ? 3'(FLEN - 8 * k - 1) : 3'd7;
    t.data = {8'(tag), 24'(f), 32'(k) ^ 32'hc3c3_0000};
    return t;
  endfunction

  always_comb for (int i = 0; i < NUM_MAC; i++) mac_tx_ready[i] = (busy[i] == 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NUM_MAC; i++) begin
      // transmit side
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
        busy[i] <= b - 1 + (mac_tx_word[i].eop ? GAP : 0);
      end else begin
        if (running[i] && mac_tx_ready[i] && !mac_tx_valid[i]) starved[i]++;
        if (busy[i] > 0) busy[i] <= busy[i] - 1;
      end
      // receive side: the design takes the offered word
      if (!rst && mac_rx_valid[i] && mac_rx_ready[i]) void'(rxq[i].pop_front());
      // the wire delivers one byte per cycle
      if (go && rx_f[i] < NRX) begin
        if (rx_gap[i] > 0) rx_gap[i]--;
        else begin
          rx_b[i]++;
          if (rx_b[i] % 8 == 0 || rx_b[i] == FLEN)
            rxq[i].push_back(frame_word(16 + i, rx_f[i], (rx_b[i] - 1) / 8));
          if (rx_b[i] == FLEN) begin
            rx_f[i]++; rx_b[i] = 0; rx_gap[i] = GAP;
          end
        end
      end
      if (rxq[i].size() > backlog_max[i]) backlog_max[i] = rxq[i].size();
      mac_rx_valid[i] <= (rxq[i].size() != 0);
      mac_rx_word[i] <= (rxq[i].size() != 0) ? rxq[i][0] : '0;
      // host side: timestamp word, then the captured frame
      if (!rst && cpu_tx_valid[i] && cpu_tx_ready[i]) begin
        if (cpu_tx_word[i].kind == W_TS) begin
          if (n_ts[i] > 0 && cpu_tx_word[i].data - last_ts[i] != 64'(FRAME_NS)) ts_bad[i]++;
          last_ts[i] = cpu_tx_word[i].data;
          n_ts[i]++;
        end else if (exp_cpu[i].size() == 0) check(0, $sformatf("unexpected word to host %0d", i));
        else begin
          automatic pkt_word_t e = exp_cpu[i].pop_front();
          check(cpu_tx_word[i] == e, $sformatf("host %0d got %h exp %h", i, cpu_tx_word[i], e));
        end
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

  // Load NFR frames into the PCAP queues of all four MACs at once.
  task automatic load_all();
    int k [NUM_MAC];
    bit take [NUM_MAC];
    bit left;
    for (int i = 0; i < NUM_MAC; i++) begin k[i] = 0; take[i] = 0; end
    do begin
      @(negedge clk);
      left = 0;
      for (int i = 0; i < NUM_MAC; i++) begin
        if (take[i]) k[i]++;
        cpu_rx_valid[i] = (k[i] < NFR * WPF);
        if (cpu_rx_valid[i]) begin
          cpu_rx_word[i] = frame_word(i, k[i] / WPF, k[i] % WPF);
          left = 1;
        end
      end
      #1;
      // ready settles after the inputs change; the word is taken at the
      // next rising edge if it is high now
      for (int i = 0; i < NUM_MAC; i++) take[i] = cpu_rx_valid[i] && cpu_rx_ready[i];
    end while (left);
    @(negedge clk);
    for (int i = 0; i < NUM_MAC; i++) cpu_rx_valid[i] = 0;
  endtask

  initial begin
    int d;
    reg_req = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < NUM_MAC; i++) begin
      cpu_rx_valid[i] = 0; cpu_rx_word[i] = '0; cpu_tx_ready[i] = 1;
      busy[i] = 0; running[i] = 0; starved[i] = 0; bytes_out[i] = 0;
      rx_f[i] = 0; rx_b[i] = 0; rx_gap[i] = 0; backlog_max[i] = 0;
      n_ts[i] = 0; ts_bad[i] = 0; last_ts[i] = 0;
      first_cyc[i] = 0; last_cyc[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    wr(12'h001, 4'hF);                     // PCAP load mode on all MACs
    load_all();
    // the last frames still pass through the receive queues and the arbiter
    for (int i = 0; i < NUM_MAC; i++)
      for (int t = 0; t < 100; t++) begin
        rd(12'h0A8 + i, d);
        if (d == NFR) break;
        repeat (100) @(negedge clk);
      end
    wr(12'h001, 0);
    for (int i = 0; i < NUM_MAC; i++) begin
      rd(12'h0A8 + i, d);
      check(d == NFR, $sformatf("%0d frames stored for MAC %0d", d, i));
      wr(12'h050 + i, ITER);
      for (int it = 0; it < ITER; it++)
        for (int k = 0; k < NFR * WPF; k++) exp_mac[i].push_back(frame_word(i, k / WPF, k % WPF));
      for (int k = 0; k < NRX * WPF; k++) exp_cpu[i].push_back(frame_word(16 + i, k / WPF, k % WPF));
    end
    wr(12'h002, 4'hF);
    wr(12'h003, 1);                        // clear capture statistics
    wr(12'h000, 32'h1F);                   // start, capture on all MACs
    @(negedge clk);
    go = 1;
    for (int c = 0; c < 150000; c++) begin
      automatic bit left = 0;
      for (int i = 0; i < NUM_MAC; i++)
        if (exp_mac[i].size() != 0 || exp_cpu[i].size() != 0) left = 1;
      if (!left) break;
      @(negedge clk);
    end
    repeat (50) @(negedge clk);
    for (int i = 0; i < NUM_MAC; i++) begin
      automatic longint span = last_cyc[i] - first_cyc[i];
      check(exp_mac[i].size() == 0, $sformatf("all replayed frames sent on MAC %0d", i));
      check(exp_cpu[i].size() == 0, $sformatf("all captured frames at host %0d", i));
      check(bytes_out[i] == longint'(ITER) * NFR * FLEN, $sformatf("MAC %0d bytes %0d", i, bytes_out[i]));
      check(starved[i] == 0, $sformatf("MAC %0d waited %0d cycles for data", i, starved[i]));
      check(backlog_max[i] <= BACKLOG_MAX, $sformatf("MAC %0d receive backlog %0d words", i, backlog_max[i]));
      check(n_ts[i] == NRX, $sformatf("host %0d got %0d timestamps", i, n_ts[i]));
      check(ts_bad[i] == 0, $sformatf("host %0d: %0d timestamp gaps off", i, ts_bad[i]));
      // frame data plus the 20-byte overhead per frame, over the span
      $display("MAC %0d: %0d frame bytes in %0d cycles = %0d Mb/s of frame data (%0d Mb/s with overhead); rx backlog max %0d",
               i, bytes_out[i], span, (bytes_out[i] * 1000) / span,
               ((bytes_out[i] + longint'(ITER) * NFR * GAP) * 1000) / span, backlog_max[i]);
      rd(12'h090 + i, d);
      check(d == ITER, "iterations done");
    end
    rd(12'h080, d);
    check(d == NUM_MAC * NRX, $sformatf("captured packets %0d", d));
    rd(12'h081, d);
    check(d == NUM_MAC * NRX * FLEN, $sformatf("captured bytes %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
