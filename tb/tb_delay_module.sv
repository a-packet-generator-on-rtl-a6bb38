// tb_delay_module: a source offers back-to-back 4-word packets. Disabled,
// packets start every 5 cycles (header + 4 words). Enabled with delay D,
// consecutive packet starts must be exactly D cycles apart (for D > 5), and
// 5 apart when D is shorter than a packet.
module tb_delay_module;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic enable;
  logic [31:0] delay;
  logic [31:0] held_cycles;
  int checks = 0, failures = 0;
  int wc = 0;
  longint cyc = 0, last_start = -1;
  int exp_gap = -1;
  int starts = 0;

  delay_module dut (.*);

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

  always_comb begin
    if (wc == 0) in_word = make_hdr(16'h1, 16'd4, 16'd8, 16'd32);
    else begin
      in_word = '0; in_word.kind = W_DATA; in_word.nbytes_m1 = 3'd7;
      in_word.eop = (wc == 4); in_word.data = 64'(wc);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid && in_ready) begin
      wc <= (wc == 4) ? 0 : wc + 1;
      check(out_valid && out_word == in_word, "word passes unchanged");
      if (wc == 0) begin
        if (last_start >= 0 && exp_gap > 0)
          check(cyc - last_start == exp_gap, $sformatf("gap %0d exp %0d", cyc - last_start, exp_gap));
        last_start <= cyc;
        starts++;
      end
    end
  end

  task automatic run(input bit en, input int d, input int gap, input int n);
    @(negedge clk);
    enable = en; delay = 32'(d);
    exp_gap = -1;
    last_start = -1;
    @(negedge clk);
    in_valid = 1;
    starts = 0;
    wait (starts == 1);
    exp_gap = gap;
    wait (starts == n);
    @(negedge clk);
    while (wc != 0) @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; enable = 0; delay = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(0, 100, 5, 10);
    run(1, 20, 20, 10);
    run(1, 3, 5, 10);
    run(1, 137, 137, 6);
    check(held_cycles > 0, "delay held packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
