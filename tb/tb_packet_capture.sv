// tb_packet_capture: MAC packets (header, timestamp, data) and CPU packets
// (header, data) are sent with capture on and off. With capture on, MAC
// packets must pass whole and be counted (packets, bytes, capture time =
// last - first timestamp); with capture off, their timestamp word must be
// removed and the header's word count reduced by one. Capture is also
// switched on for one MAC port only. CPU packets always
// pass unchanged and are never counted. stats_clear must zero the counts.
module tb_packet_capture;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [NUM_MAC-1:0] capture_en;
  logic stats_clear;
  logic [31:0] pkt_cnt, byte_cnt, ts_stripped;
  logic [63:0] first_ts, last_ts, capture_time;
  int checks = 0, failures = 0;
  pkt_word_t exp_q [$];

  packet_capture dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    automatic pkt_word_t e;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front();
      check(out_word == e, $sformatf("got %h exp %h", out_word, e));
    end
  end

  task automatic put(input pkt_word_t w);
    in_word = w; in_valid = 1;
    out_ready = ($urandom_range(0, 3) != 0);
    #1;
    while (!in_ready) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // Send one packet; src even = MAC (with timestamp ts), odd = CPU.
  task automatic pkt(input int src, input int nwords, input longint ts);
    automatic bit mac = (src % 2 == 0);
    automatic int wl = nwords + (mac ? 1 : 0);
    automatic pkt_word_t w;
    automatic int bytes = nwords * 8;
    w = make_hdr(16'(1 << (src ^ 1)), 16'(wl), 16'(src), 16'(bytes));
    exp_q.push_back((mac && !capture_en[src/2]) ? make_hdr(16'(1 << (src ^ 1)), 16'(wl - 1), 16'(src), 16'(bytes)) : w);
    put(w);
    if (mac) begin
      w = '0; w.kind = W_TS; w.nbytes_m1 = 3'd7; w.data = 64'(ts);
      if (capture_en[src/2]) exp_q.push_back(w);
      put(w);
    end
    for (int k = 0; k < nwords; k++) begin
      w = '0; w.kind = W_DATA; w.nbytes_m1 = 3'd7; w.eop = (k == nwords - 1);
      w.data = {32'(src), 32'(k)};
      exp_q.push_back(w);
      put(w);
    end
  endtask

  initial begin
    in_valid = 0; in_word = '0; out_ready = 1; capture_en = '0; stats_clear = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    capture_en = '1;
    pkt(0, 3, 1000);
    pkt(1, 2, 0);
    pkt(2, 4, 1800);
    pkt(6, 1, 5000);
    repeat (3) @(negedge clk);
    out_ready = 1;
    check(pkt_cnt == 3, $sformatf("pkt_cnt %0d", pkt_cnt));
    check(byte_cnt == 64, $sformatf("byte_cnt %0d", byte_cnt));
    check(first_ts == 1000 && last_ts == 5000, "first/last ts");
    check(capture_time == 4000, $sformatf("capture_time %0d", capture_time));
    capture_en = '0;
    pkt(4, 2, 7000);
    pkt(3, 2, 0);
    pkt(0, 5, 9000);
    repeat (3) @(negedge clk);
    check(pkt_cnt == 3 && ts_stripped == 2, "no counting while capture is off");
    stats_clear = 1; @(negedge clk); stats_clear = 0;
    check(pkt_cnt == 0 && byte_cnt == 0 && capture_time == 0, "stats cleared");
    capture_en = '1;
    pkt(2, 2, 20000);
    repeat (3) @(negedge clk);
    check(pkt_cnt == 1 && byte_cnt == 16 && capture_time == 0, "count after clear");
    // Per-port capture: only MAC 2 (source port 4) on.
    capture_en = 4'b0100;
    pkt(4, 3, 21000);
    pkt(0, 2, 22000);
    pkt(6, 1, 23000);
    pkt(4, 1, 24000);
    repeat (3) @(negedge clk);
    check(pkt_cnt == 3 && byte_cnt == 16 + 24 + 8 && capture_time == 4000, "per-port capture counts");
    check(exp_q.size() == 0, "all words out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
