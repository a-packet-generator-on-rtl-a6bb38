// tb_rx_queue: packets of random length (a timestamp word and 1..6 data
// words with a random last-word byte count) are pushed into the queue; each
// must come out as a header (source port, word and byte counts worked out
// here) followed by the same words, with random backpressure on both sides.
module tb_rx_queue;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  pkt_word_t exp_q [$];

  rx_queue #(.SRC_PORT(6), .DATA_DEPTH(16), .PKT_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer.
  initial begin
    in_valid = 0; in_word = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int p = 0; p < 40; p++) begin
      automatic int n = $urandom_range(1, 6);
      automatic int last = $urandom_range(0, 7);
      automatic pkt_word_t w [$];
      automatic int bytes = 8 * (n - 1) + last + 1;
      automatic pkt_word_t t;
      t = '0; t.kind = W_TS; t.nbytes_m1 = 3'd7; t.data = {32'hBEEF0000, 32'(p)};
      w.push_back(t);
      for (int k = 0; k < n; k++) begin
        t = '0; t.kind = W_DATA; t.data = {32'(p), 32'(k)};
        t.eop = (k == n - 1); t.nbytes_m1 = (k == n - 1) ? 3'(last) : 3'd7;
        w.push_back(t);
      end
      exp_q.push_back(make_hdr(16'd0, 16'(n + 1), 16'd6, 16'(bytes)));
      foreach (w[i]) exp_q.push_back(w[i]);
      foreach (w[i]) begin
        in_word = w[i]; in_valid = 1;
        #1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
    end
  end

  // Consumer.
  int got = 0;
  initial begin
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (!rst && out_valid && out_ready) begin
        automatic pkt_word_t e;
        if (exp_q.size() == 0) begin check(0, "unexpected word"); end
        else begin
          e = exp_q.pop_front();
          check(out_word == e, $sformatf("word %0d got %h exp %h", got, out_word, e));
        end
        got++;
      end
      if (!rst && got > 0 && exp_q.size() == 0 && !out_valid) begin
        check(got >= 40 * 3, "all packets out");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
