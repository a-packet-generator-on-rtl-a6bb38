// tb_tx_queue: packets (header + 1..5 words) go in with random gaps and come
// out without their header, in order, under random backpressure; pkts_sent
// must count the packets whose last word left.
module tb_tx_queue;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] pkts_sent;
  int checks = 0, failures = 0;
  pkt_word_t exp_q [$];
  int done_pk = 0;

  tx_queue #(.DEPTH(8)) dut (.*);

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
      if (e.eop) done_pk++;
    end
  end

  initial begin
    out_ready = 0;
    forever begin @(negedge clk); out_ready = ($urandom_range(0, 2) != 0); end
  end

  initial begin
    in_valid = 0; in_word = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 30; p++) begin
      automatic int n = $urandom_range(1, 5);
      for (int k = 0; k <= n; k++) begin
        automatic pkt_word_t w;
        if (k == 0) w = make_hdr(16'h1, 16'(n), 16'd0, 16'(8 * n));
        else begin
          w = '0; w.kind = (k == 1 && p % 3 == 0) ? W_TS : W_DATA;
          w.data = {32'(p), 32'(k)}; w.eop = (k == n); w.nbytes_m1 = 3'd7;
          exp_q.push_back(w);
        end
        in_word = w; in_valid = 1;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    repeat (40) @(negedge clk);
    check(exp_q.size() == 0, "all words out");
    check(pkts_sent == 30 && done_pk == 30, $sformatf("pkts_sent %0d", pkts_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
