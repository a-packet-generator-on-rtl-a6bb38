// tb_packet_generator_top: end-to-end run of the whole pipeline at its
// default sizes (512K-word packet memory), driven only through the MAC and
// host streams and the register bus:
//  - capture on: frames arriving on all four MAC ports at once reach the
//    host with a timestamp word; the capture counters read back right;
//  - capture off: a MAC frame reaches the host without its timestamp;
//  - NIC transmit: a host frame for MAC 3 leaves on MAC 3;
//  - a frame too large for a shrunken queue is dropped and counted;
//  - PCAP load: frames from the host are kept in the PCAP queues of MAC 0
//    and MAC 1, then replayed 2 and 3 times when the global enable is set,
//    MAC 0 rate limited to 500 Mb/s, MAC 1 with a 400-cycle packet delay
//    (packet starts on the MAC checked to within one cycle);
//  - after the generator is stopped MAC 0 sends from its normal queue again.
// The host DMA side accepts words with random pauses throughout.
// Every mechanism (capture, timestamp removal, arbitration under contention,
// drop, replay, output-select switch, rate-limit hold, delay hold) is counted
// and must have happened at least once.
module tb_packet_generator_top;
  import pg_pkg::*;
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
  // expected and observed words per output
  pkt_word_t exp_mac [NUM_MAC][$];
  pkt_word_t exp_cpu [NUM_MAC][$];
  longint mac_start [NUM_MAC][$];
  int mac_sop [NUM_MAC];
  // mechanism counters
  int n_capture = 0, n_strip = 0, n_contend = 0, n_drop = 0, n_replay = 0;
  int n_switch = 0, n_rate_hold = 0, n_delay_hold = 0;

  localparam int QS = (2**19) / 12;

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

  // ---- observers ----
  logic [NUM_MAC-1:0] sel_q;
  always @(posedge clk) if (!rst) begin
    automatic int nv = 0;
    cyc <= cyc + 1;
    for (int p = 0; p < NUM_PORTS; p++) if (dut.rq_valid[p]) nv++;
    if (nv > 1) n_contend++;
    if (dut.sel_pcap != sel_q) n_switch++;
    sel_q <= dut.sel_pcap;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (dut.rl_held[p] != 0 && dut.os_valid[p] && !dut.rl_valid[p]) n_rate_hold++;
      if (dut.dl_valid[p] == 1'b0 && dut.rl_valid[p]) n_delay_hold++;
    end
    for (int i = 0; i < NUM_MAC; i++) begin
      if (mac_tx_valid[i] && mac_tx_ready[i]) begin
        if (exp_mac[i].size() == 0) check(0, $sformatf("unexpected word on MAC %0d", i));
        else begin
          automatic pkt_word_t e = exp_mac[i].pop_front();
          check(mac_tx_word[i] == e, $sformatf("MAC %0d got %h exp %h", i, mac_tx_word[i], e));
        end
        if (mac_sop[i] == 1) mac_start[i].push_back(cyc);
        mac_sop[i] = mac_tx_word[i].eop ? 1 : 0;
      end
      if (cpu_tx_valid[i] && cpu_tx_ready[i]) begin
        if (exp_cpu[i].size() == 0) check(0, $sformatf("unexpected word to host %0d", i));
        else begin
          automatic pkt_word_t e = exp_cpu[i].pop_front();
          if (e.kind == W_TS) begin
            check(cpu_tx_word[i].kind == W_TS && cpu_tx_word[i].data <= 64'(cyc * 8)
                  && cpu_tx_word[i].data > 0, "timestamp word to host");
            n_capture++;
          end else
            check(cpu_tx_word[i] == e, $sformatf("host %0d got %h exp %h", i, cpu_tx_word[i], e));
        end
      end
    end
  end

  // The host side takes words with random pauses.
  always @(negedge clk) for (int i = 0; i < NUM_MAC; i++) cpu_tx_ready[i] = ($urandom_range(0, 2) != 0);

  // ---- register bus ----
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

  task automatic expect_reg(input int a, input int e, input string what);
    int d;
    rd(a, d);
    check(d == e, $sformatf("%s: reg %h = %0d exp %0d", what, a, d, e));
  endtask

  // ---- frame sources ----
  function automatic void frame(input int tag, input int nbytes, ref pkt_word_t w [$]);
    automatic int n = (nbytes + 7) / 8;
    pkt_word_t t;
    w.delete();
    for (int k = 0; k < n; k++) begin
      t = '0; t.kind = W_DATA; t.eop = (k == n - 1);
      t.nbytes_m1 = (k == n - 1) ? 3'(nbytes - 8 * k - 1) : 3'd7;
      t.data = {16'hF00D, 16'(tag), 32'(k)};
      w.push_back(t);
    end
  endfunction

  task automatic send_mac(input int i, input pkt_word_t w [$]);
    foreach (w[k]) begin
      @(negedge clk);
      mac_rx_word[i] = w[k]; mac_rx_valid[i] = 1;
      #1;
      while (!mac_rx_ready[i]) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    mac_rx_valid[i] = 0;
  endtask

  task automatic send_cpu(input int i, input pkt_word_t w [$]);
    foreach (w[k]) begin
      @(negedge clk);
      cpu_rx_word[i] = w[k]; cpu_rx_valid[i] = 1;
      #1;
      while (!cpu_rx_ready[i]) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    cpu_rx_valid[i] = 0;
  endtask

  task automatic wait_drained(input int maxc);
    int c = 0;
    bit busy = 1;
    while (busy && c < maxc) begin
      busy = 0;
      for (int i = 0; i < NUM_MAC; i++) if (exp_mac[i].size() != 0 || exp_cpu[i].size() != 0) busy = 1;
      @(negedge clk);
      c++;
    end
    check(!busy, "all expected words delivered");
  endtask

  pkt_word_t f [NUM_MAC][$];
  pkt_word_t pcap0 [$];
  pkt_word_t pcap1 [$];
  int pcap0_len [$];
  int pcap1_len [$];

  initial begin
    int d;
    reg_req = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < NUM_MAC; i++) begin
      mac_rx_valid[i] = 0; cpu_rx_valid[i] = 0; mac_rx_word[i] = '0; cpu_rx_word[i] = '0;
      mac_tx_ready[i] = 1; cpu_tx_ready[i] = 1; mac_sop[i] = 1;
    end
    sel_q = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // Shrink MAC 2's reference queue (queue 4) to 6 words, then empty all.
    wr(12'h018, 4 * QS);
    wr(12'h019, 4 * QS + 5);
    wr(12'h003, 2);

    // 1. capture on: four MAC ports at once.
    wr(12'h000, 32'h1E);
    for (int i = 0; i < NUM_MAC; i++) begin
      pkt_word_t ts;
      frame(10 + i, 20 + 9 * i, f[i]);
      ts = '0; ts.kind = W_TS;
      exp_cpu[i].push_back(ts);
      foreach (f[i][k]) exp_cpu[i].push_back(f[i][k]);
    end
    fork
      send_mac(0, f[0]);
      send_mac(1, f[1]);
      send_mac(2, f[2]);
      send_mac(3, f[3]);
    join
    wait_drained(2000);
    expect_reg(12'h080, 4, "captured packets");
    expect_reg(12'h081, 20 + 29 + 38 + 47, "captured bytes");
    rd(12'h082, d);
    check(d >= 0 && d < 400, "capture time plausible");

    // 2. capture off: timestamp removed.
    wr(12'h000, 0);
    frame(20, 30, f[1]);
    foreach (f[1][k]) exp_cpu[1].push_back(f[1][k]);
    send_mac(1, f[1]);
    wait_drained(2000);
    rd(12'h080, d);
    check(d == 4, "no counting with capture off");
    n_strip = int'(dut.ts_stripped);

    // 3. NIC transmit on MAC 3.
    frame(30, 64, f[3]);
    foreach (f[3][k]) exp_mac[3].push_back(f[3][k]);
    send_cpu(3, f[3]);
    wait_drained(2000);

    // 4. drop: 8 words + header into the 6-word queue of MAC 2.
    frame(40, 64, f[2]);
    send_cpu(2, f[2]);
    repeat (50) @(negedge clk);
    rd(12'h0B4, d);
    check(d == 1, "oversize packet dropped");
    n_drop = d;

    // 5. load PCAP queues of MAC 0 (3 frames) and MAC 1 (2 frames).
    wr(12'h001, 3);
    for (int k = 0; k < 3; k++) begin
      frame(100 + k, 60 + 40 * k, f[0]);
      pcap0_len.push_back(60 + 40 * k);
      foreach (f[0][j]) pcap0.push_back(f[0][j]);
      send_cpu(0, f[0]);
    end
    for (int k = 0; k < 2; k++) begin
      frame(200 + k, 64 + 8 * k, f[1]);
      pcap1_len.push_back(64 + 8 * k);
      foreach (f[1][j]) pcap1.push_back(f[1][j]);
      send_cpu(1, f[1]);
    end
    repeat (100) @(negedge clk);
    expect_reg(12'h0A8, 3, "PCAP queue 0 stored");
    expect_reg(12'h0A9, 2, "PCAP queue 1 stored");
    check(mac_start[0].size() == 0 && mac_start[1].size() == 0, "nothing sent while loading");

    // 6. replay: MAC 0 twice at 500 Mb/s, MAC 1 three times 400 cycles apart.
    wr(12'h001, 0);
    wr(12'h050, 2);
    wr(12'h051, 3);
    wr(12'h030, 128);
    wr(12'h042, 400);
    wr(12'h04A, 1);
    wr(12'h002, 3);
    for (int it = 0; it < 2; it++) foreach (pcap0[j]) exp_mac[0].push_back(pcap0[j]);
    for (int it = 0; it < 3; it++) foreach (pcap1[j]) exp_mac[1].push_back(pcap1[j]);
    wr(12'h038, 1);
    wr(12'h000, 1);
    wait_drained(20000);
    repeat (50) @(negedge clk);
    expect_reg(12'h090, 2, "MAC 0 iterations done");
    expect_reg(12'h091, 3, "MAC 1 iterations done");
    rd(12'h090, d); n_replay += d;
    rd(12'h091, d); n_replay += d;
    expect_reg(12'h0C0, 6, "MAC 0 packets sent");
    expect_reg(12'h0C2, 6, "MAC 1 packets sent");
    // Delay: MAC 1 packet starts 400 cycles apart. The delay module is
    // exact; the frame's first word may trail its header by one cycle more
    // or less depending on the packet memory's read turns.
    check(mac_start[1].size() == 6, "six packets on MAC 1");
    for (int k = 1; k < mac_start[1].size(); k++)
      check(mac_start[1][k] - mac_start[1][k-1] >= 399 && mac_start[1][k] - mac_start[1][k-1] <= 401,
            $sformatf("MAC 1 gap %0d", mac_start[1][k] - mac_start[1][k-1]));
    // Rate: at 0.5 byte per cycle a frame of B bytes is followed by 2B cycles.
    check(mac_start[0].size() == 6, "six packets on MAC 0");
    for (int k = 1; k < mac_start[0].size(); k++) begin
      automatic longint g = mac_start[0][k] - mac_start[0][k-1];
      automatic int b = pcap0_len[(k - 1) % 3];
      check(g >= 2 * b - 8 && g <= 2 * b + 8, $sformatf("MAC 0 gap %0d for %0d bytes", g, b));
    end

    // 7. generator off: MAC 0 sends from its normal queue again.
    wr(12'h000, 0);
    frame(50, 24, f[0]);
    foreach (f[0][k]) exp_mac[0].push_back(f[0][k]);
    send_cpu(0, f[0]);
    wait_drained(2000);
    expect_reg(12'h0A0, 1, "normal queue of MAC 0 used");

    check(n_capture > 0, "capture happened");
    check(n_strip > 0, "timestamp removal happened");
    check(n_contend > 0, "arbitration under contention happened");
    check(n_drop > 0, "drop happened");
    check(n_replay > 0, "replay happened");
    check(n_switch >= 2, "output select switched both ways");
    check(n_rate_hold > 0, "rate limiter held a packet");
    check(n_delay_hold > 0, "delay module held a packet");
    $display("mechanisms: capture=%0d strip=%0d contend=%0d drop=%0d replay=%0d switch=%0d rate_hold=%0d delay_hold=%0d",
             n_capture, n_strip, n_contend, n_drop, n_replay, n_switch, n_rate_hold, n_delay_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
