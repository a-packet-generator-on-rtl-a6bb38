// tb_output_port_lookup: headers from each of the eight source ports must
// leave with the one-hot destination of the paired port (MAC i <-> CPU i),
// other header fields and all non-header words unchanged, one cycle later.
module tb_output_port_lookup;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  pkt_word_t exp_q [$];
  int sent = 0, got = 0;

  output_port_lookup dut (.*);

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

  always @(posedge clk) if (!rst) begin
    if (out_valid && out_ready) begin
      automatic pkt_word_t e = exp_q.pop_front();
      check(out_word == e, $sformatf("got %h exp %h", out_word, e));
      got++;
    end
  end

  // Latency: a word accepted while the output is empty appears next cycle.
  logic took_prev;
  always @(posedge clk) begin
    if (!rst && took_prev && out_ready) check(out_valid, "one-cycle latency");
    took_prev <= in_valid && in_ready && !out_valid;
  end

  initial begin
    in_valid = 0; in_word = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 4; r++)
      for (int s = 0; s < 8; s++) begin
        for (int k = 0; k < 3; k++) begin
          automatic pkt_word_t w, e;
          if (k == 0) begin
            w = make_hdr(16'h0000, 16'd2, 16'(s), 16'(100 + s));
            e = make_hdr(16'(1 << (s ^ 1)), 16'd2, 16'(s), 16'(100 + s));
          end else begin
            w = '0; w.kind = (k == 1 && s % 2 == 0) ? W_TS : W_DATA;
            w.data = {32'(s), 32'(k)}; w.eop = (k == 2); w.nbytes_m1 = 3'(s);
            e = w;
          end
          in_word = w; in_valid = 1;
          out_ready = (r == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
          #1;
          while (!in_ready) begin
            @(negedge clk);
            out_ready = ($urandom_range(0, 2) != 0);
            #1;
          end
          exp_q.push_back(e);
          @(negedge clk);
        end
      end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    check(got == 96 && exp_q.size() == 0, "all words out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
