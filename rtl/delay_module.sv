// delay_module: per-port inter-packet delay.
// While enabled, a packet may start only when at least 'delay' clock cycles
// have passed since the start of the previous packet on this port; the
// header word is held until then. Measuring start to start makes the
// spacing on the wire exact whatever the packet lengths, as long as the
// delay is longer than the packet's time on the wire. When enable is low,
// packets pass freely. A delay module on each output port, set by a register
// with an enable, follows the document; the start-to-start rule and the unit
// (clock cycles, 8 ns at 125 MHz) are this design's own choices.
// Interface: valid/ready stream in and out plus enable and delay.
// Timing: combinational; the words of a started packet are never held back.
module delay_module
  import pg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [31:0] delay,
  input  pkt_word_t   in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_word_t   out_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] held_cycles
);
  logic [31:0] since;     // cycles since the last packet start (saturating)
  logic        hold, start;

  assign hold      = enable && in_word.kind == W_HDR && since < delay;
  assign out_word  = in_word;
  assign out_valid = in_valid && !hold;
  assign in_ready  = out_ready && !hold;
  assign start     = in_valid && in_ready && in_word.kind == W_HDR;

  always_ff @(posedge clk) begin
    if (rst)                      since <= '1;
    else if (start)               since <= 32'd1;
    else if (since != '1)         since <= since + 32'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) held_cycles <= '0;
    else if (in_valid && hold) held_cycles <= held_cycles + 32'd1;
  end
endmodule
