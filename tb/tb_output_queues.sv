// tb_output_queues: a 256-word memory split into twelve 20-word regions.
//  1. Packets for each output port come out of that port's queue intact.
//  2. With pcap_load[1] set, host packets for MAC 1 (port 2) go to PCAP
//     queue 9 and stay there while the generator is off.
//  3. With iterations = 3, raising pktgen_en replays the stored packets three
//     times in order, and iter_cnt ends at 3. Raising it again replays again.
//  4. A packet larger than its queue's free space is dropped and counted.
//  5. A reference queue wraps around its region: 12 packets of 5 words each
//     through a 20-word queue, with the output stalled at times.
module tb_output_queues;
  import pg_pkg::*;
  localparam int NQ = 12, NPC = 4, AW = 8;
  logic clk = 0, rst = 1;
  pkt_word_t in_word;
  logic in_valid, in_ready;
  logic [AW-1:0] q_lo [NQ];
  logic [AW-1:0] q_hi [NQ];
  logic oq_init;
  logic [NPC-1:0] pcap_load;
  logic pktgen_en;
  logic [31:0] iterations [NPC];
  pkt_word_t out_word [NQ];
  logic out_valid [NQ], out_ready [NQ];
  logic [31:0] iter_cnt [NPC];
  logic [31:0] pkts_stored [NQ];
  logic [31:0] pkts_dropped [NQ];
  int checks = 0, failures = 0;
  pkt_word_t exp_q [NQ][$];
  int got [NQ];

  output_queues #(.NUM_Q(NQ), .NUM_PCAP(NPC), .ADDR_W(AW), .OUT_FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst)
    for (int q = 0; q < NQ; q++)
      if (out_valid[q] && out_ready[q]) begin
        if (exp_q[q].size() == 0) check(0, $sformatf("unexpected word on queue %0d", q));
        else begin
          automatic pkt_word_t e = exp_q[q].pop_front();
          check(out_word[q] == e, $sformatf("q%0d got %h exp %h", q, out_word[q], e));
        end
        got[q]++;
      end

  // Build a packet for output port dst with n data words.
  function automatic void build(input int dst, input int n, input int tag, ref pkt_word_t w [$]);
    pkt_word_t t;
    w.delete();
    w.push_back(make_hdr(16'(1 << dst), 16'(n), 16'(dst ^ 1), 16'(8 * n)));
    for (int k = 0; k < n; k++) begin
      t = '0; t.kind = W_DATA; t.nbytes_m1 = 3'd7; t.eop = (k == n - 1);
      t.data = {16'(tag), 16'(dst), 32'(k)};
      w.push_back(t);
    end
  endfunction

  task automatic send(ref pkt_word_t w [$]);
    foreach (w[i]) begin
      in_word = w[i]; in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic wait_empty(input int q, input int maxc);
    for (int c = 0; c < maxc && exp_q[q].size() != 0; c++) @(negedge clk);
    check(exp_q[q].size() == 0, $sformatf("queue %0d drained", q));
  endtask

  pkt_word_t pk [$];
  pkt_word_t pcap [$];

  initial begin
    in_valid = 0; in_word = '0; oq_init = 0; pcap_load = '0; pktgen_en = 0;
    for (int q = 0; q < NQ; q++) begin
      q_lo[q] = AW'(q * 20); q_hi[q] = AW'(q * 20 + 19);
      out_ready[q] = 1; got[q] = 0;
    end
    for (int i = 0; i < NPC; i++) iterations[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. each output port
    for (int p = 0; p < 8; p++) begin
      build(p, 1 + p % 4, p, pk);
      foreach (pk[i]) exp_q[p].push_back(pk[i]);
      send(pk);
    end
    for (int p = 0; p < 8; p++) wait_empty(p, 100);
    for (int p = 0; p < 8; p++) check(pkts_stored[p] == 1, "stored count");
    // 2. load PCAP queue 9 with three packets
    pcap_load = 4'b0010;
    pcap.delete();
    for (int k = 0; k < 3; k++) begin
      build(2, 2 + k, 100 + k, pk);
      foreach (pk[i]) pcap.push_back(pk[i]);
      send(pk);
    end
    pcap_load = '0;
    repeat (30) @(negedge clk);
    check(got[9] == 0 && got[2] == 4, "PCAP data held while generator is off");
    check(pkts_stored[9] == 3, "three PCAP packets stored");
    // 3. replay three times
    iterations[1] = 3;
    for (int it = 0; it < 3; it++) foreach (pcap[i]) exp_q[9].push_back(pcap[i]);
    pktgen_en = 1;
    wait_empty(9, 400);
    repeat (20) @(negedge clk);
    check(iter_cnt[1] == 3, $sformatf("iter_cnt %0d", iter_cnt[1]));
    check(got[9] == 3 * pcap.size(), $sformatf("exactly three replays: %0d words of %0d", got[9], pcap.size()));
    pktgen_en = 0;
    @(negedge clk);
    iterations[1] = 1;
    foreach (pcap[i]) exp_q[9].push_back(pcap[i]);
    pktgen_en = 1;
    wait_empty(9, 400);
    repeat (20) @(negedge clk);
    check(iter_cnt[1] == 1 && got[9] == 4 * pcap.size(), "replay restarts on enable");
    pktgen_en = 0;
    // 4. drop: 25-word packet into a 20-word queue
    build(5, 24, 55, pk);
    send(pk);
    repeat (10) @(negedge clk);
    check(pkts_dropped[5] == 1 && exp_q[5].size() == 0, "oversize packet dropped");
    // 5. wrap-around with a stalled output; a packet that finds the queue
    //    full is dropped, so its expected words are taken back.
    out_ready[0] = 0;
    for (int k = 0; k < 12; k++) begin
      automatic int drops0 = int'(pkts_dropped[0]);
      build(0, 4, 200 + k, pk);
      foreach (pk[i]) exp_q[0].push_back(pk[i]);
      send(pk);
      repeat (2) @(negedge clk);
      if (int'(pkts_dropped[0]) != drops0) repeat (pk.size()) void'(exp_q[0].pop_back());
      if (k == 5) out_ready[0] = 1;
      if (k >= 5) repeat (8) @(negedge clk);
    end
    wait_empty(0, 200);
    check(pkts_stored[0] + pkts_dropped[0] == 13, "all packets accounted");
    check(pkts_dropped[0] >= 1 && pkts_stored[0] >= 9, $sformatf("full queue drops (%0d stored, %0d dropped)", pkts_stored[0], pkts_dropped[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
