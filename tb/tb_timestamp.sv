// tb_timestamp: checks that every packet on each MAC receive stream is
// preceded by one timestamp word holding 8 ns x (clock cycles since reset),
// that the frame words follow unchanged, and that ports are independent.
module tb_timestamp;
  import pg_pkg::*;
  localparam int NP = 2;
  logic clk = 0, rst = 1;
  pkt_word_t in_word [NP];
  logic in_valid [NP], in_ready [NP];
  pkt_word_t out_word [NP];
  logic out_valid [NP], out_ready [NP];
  logic [63:0] now;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  timestamp #(.NPORTS(NP), .NS_PER_CYCLE(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

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

  // Send one packet of n words on port p; check what comes out.
  task automatic send(input int p, input int n, input int gap);
    int got = 0;
    bit seen_ts = 0;
    repeat (gap) @(negedge clk);
    while (got < n) begin
      @(negedge clk);
      in_valid[p] = 1;
      in_word[p].kind = W_DATA;
      in_word[p].data = 64'hA000_0000 + 64'(p * 256 + got);
      in_word[p].eop  = (got == n - 1);
      in_word[p].nbytes_m1 = 3'd7;
      out_ready[p] = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid[p] && out_ready[p]) begin
        if (!seen_ts) begin
          check(out_word[p].kind == W_TS, "first word is timestamp");
          check(out_word[p].data == 64'(cyc * 8), $sformatf("ts %0d exp %0d", out_word[p].data, cyc*8));
          check(!in_ready[p], "input held during timestamp");
          seen_ts = 1;
        end else begin
          check(out_word[p].kind == W_DATA && out_word[p].data == 64'hA000_0000 + 64'(p * 256 + got)
                && out_word[p].eop == (got == n - 1), "data word passes");
          got++;
        end
      end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid[p] = 0;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = 0; out_ready[p] = 1; in_word[p] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin for (int k = 0; k < 6; k++) send(0, 1 + k, k); end
      begin for (int k = 0; k < 6; k++) send(1, 3, 2 * k + 1); end
    join
    check(now == 64'(cyc * 8), "now output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
