// tb_rate_limiter: a source offers back-to-back 64-byte (8-word) packets.
// Disabled, packets start every 8 cycles. Enabled with rate 128 (half a byte
// per cycle), consecutive packet starts must be exactly 64 / 0.5 = 128 cycles
// apart (from the second gap on: the first may use saved-up credit); with rate 256 (one byte per cycle), 64 cycles apart.
module tb_rate_limiter;
  import pg_pkg::*;
  logic clk = 0, rst = 1;
  pkt_word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic enable;
  logic [15:0] rate;
  logic [31:0] held_cycles;
  int checks = 0, failures = 0;
  int wc = 0;
  longint cyc = 0, last_start = -1;
  int exp_gap = 8;
  int starts = 0;

  rate_limiter #(.FRAC_W(8), .MAX_BURST_BYTES(2048)) dut (.*);

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

  // Source: header + 8 data words, byte_len 64, always valid.
  always_comb begin
    if (wc == 0) in_word = make_hdr(16'h1, 16'd8, 16'd8, 16'd64);
    else begin
      in_word = '0; in_word.kind = W_DATA; in_word.nbytes_m1 = 3'd7;
      in_word.eop = (wc == 8); in_word.data = 64'(wc);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid && in_ready) begin
      wc <= (wc == 8) ? 0 : wc + 1;
      check(out_valid && out_word == in_word, "word passes unchanged");
      if (wc == 0) begin
        if (last_start >= 0 && exp_gap > 0)
          check(cyc - last_start == exp_gap, $sformatf("gap %0d exp %0d", cyc - last_start, exp_gap));
        last_start <= cyc;
        starts++;
      end
    end
  end

  task automatic run(input bit en, input int r, input int gap, input int n);
    @(negedge clk);
    enable = en; rate = 16'(r);
    exp_gap = -1;                 // first start of a run is not measured
    last_start = -1;
    @(negedge clk);
    in_valid = 1;
    starts = 0;
    wait (starts == 2);          // after the first gap the bucket is empty
    exp_gap = gap;
    wait (starts == n);
    @(negedge clk);
    while (wc != 0) @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; enable = 0; rate = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(0, 0, 9, 10);
    run(1, 128, 128, 10);
    run(1, 256, 64, 10);
    check(held_cycles > 0, "limiter held packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
