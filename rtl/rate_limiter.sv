// rate_limiter: per-port transmit rate limit (token bucket).
// A credit counter, in units of 1/2^FRAC_W byte, grows by 'rate' every clock
// up to MAX_BURST_BYTES. A packet may start (its header word pass) only when
// the credit is not negative; the packet's byte_len is then taken from the
// credit, which may go negative. Over time the port therefore carries
// rate / 2^FRAC_W bytes per clock: with FRAC_W = 8 and a 125 MHz clock,
// rate = 256 is 1 Gb/s and rate = 128 is 500 Mb/s. When enable is low the
// credit is held at zero and packets pass freely.
// A rate limiter on each of the eight output ports, set by registers with an
// enable, follows the document; the token-bucket method and the rate unit are
// this design's own choices.
// Interface: valid/ready stream in and out plus enable and rate.
// Timing: combinational; the words of a started packet are never held back.
module rate_limiter
  import pg_pkg::*;
#(
  parameter int FRAC_W          = 8,
  parameter int MAX_BURST_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [15:0] rate,
  input  pkt_word_t   in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_word_t   out_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] held_cycles
);
  localparam logic signed [31:0] MAX_CREDIT = 32'(MAX_BURST_BYTES) <<< FRAC_W;

  logic signed [31:0] credit, credit_inc;
  logic               hold;
  logic               start;

  assign hold      = enable && in_word.kind == W_HDR && credit < 0;
  assign out_word  = in_word;
  assign out_valid = in_valid && !hold;
  assign in_ready  = out_ready && !hold;
  assign start     = in_valid && in_ready && in_word.kind == W_HDR;

  always_comb begin
    credit_inc = credit + 32'(rate);
    if (credit_inc > MAX_CREDIT) credit_inc = MAX_CREDIT;
    if (start) credit_inc = credit_inc - (32'(get_hdr(in_word).byte_len) <<< FRAC_W);
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) credit <= '0;
    else                credit <= credit_inc;
  end

  always_ff @(posedge clk) begin
    if (rst) held_cycles <= '0;
    else if (in_valid && hold) held_cycles <= held_cycles + 32'd1;
  end
endmodule
