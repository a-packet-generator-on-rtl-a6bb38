// tb_input_arbiter: all eight inputs always offer 3-word packets tagged with
// their input number and a sequence number. The output must show whole
// packets (never interleaved) granted strictly in the order 0,1,...,7,0,...
// Then only inputs 2 and 5 request: they must alternate.
module tb_input_arbiter;
  import pg_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  pkt_word_t in_word [N];
  logic in_valid [N], in_ready [N];
  pkt_word_t out_word;
  logic out_valid, out_ready;
  int checks = 0, failures = 0;
  int wcount [N];
  int seq [N];
  logic [N-1:0] active;

  input_arbiter #(.NUM_IN(N)) dut (.*);

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

  // Sources: packet k of input i = 3 words {i, k, word}.
  always_comb
    for (int i = 0; i < N; i++) begin
      in_valid[i]          = active[i];
      in_word[i]           = '0;
      in_word[i].kind      = W_DATA;
      in_word[i].eop       = (wcount[i] == 2);
      in_word[i].nbytes_m1 = 3'd7;
      in_word[i].data      = {16'(i), 16'(seq[i]), 32'(wcount[i])};
    end

  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_ready[i]) begin
        if (wcount[i] == 2) begin wcount[i] <= 0; seq[i] <= seq[i] + 1; end
        else wcount[i] <= wcount[i] + 1;
      end

  int exp_in = 0, exp_w = 0;
  int phase = 0;
  int npk = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    check(out_word.data[63:48] == 16'(exp_in) && out_word.data[31:0] == 32'(exp_w),
          $sformatf("got in %0d w %0d exp in %0d w %0d", out_word.data[63:48], out_word.data[31:0], exp_in, exp_w));
    if (exp_w == 2) begin
      exp_w = 0;
      npk++;
      if (phase == 0) exp_in = (exp_in + 1) % N;
      else            exp_in = (exp_in == 2) ? 5 : 2;
    end else exp_w++;
  end

  initial begin
    active = '0; out_ready = 1;
    for (int i = 0; i < N; i++) begin wcount[i] = 0; seq[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    active = '1;
    wait (npk == 40);
    @(negedge clk);
    active = '0;
    repeat (3) @(negedge clk);
    phase = 1; exp_in = 2;
    active = 8'b0010_0100;
    while (npk < 60) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    active = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
