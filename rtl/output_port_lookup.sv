// output_port_lookup: the output port lookup of a reference NIC.
// A packet received on MAC port i (source port 2i) is sent to CPU queue i
// (port 2i+1), so the host sees all incoming traffic; a packet from CPU
// queue i is sent out on MAC port i. The MAC-to-CPU direction is what the
// document describes; the CPU-to-MAC direction is the usual NIC behaviour and
// is how host data reaches the transmit side.
// Only the destination field of the header word is written; other words pass
// unchanged. A register stage with a skid-free valid/ready handshake
// (one word held, ready when empty or draining) separates it from its
// neighbours.
// Timing: one cycle latency, one word per cycle.
module output_port_lookup
  import pg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  pkt_word_t in_word,
  input  logic      in_valid,
  output logic      in_ready,
  output pkt_word_t out_word,
  output logic      out_valid,
  input  logic      out_ready
);
  pkt_word_t w;
  hdr_t      h;

  always_comb begin
    w = in_word;
    h = get_hdr(in_word);
    if (in_word.kind == W_HDR) begin
      h.dst  = 16'd1 << {h.src[15:1], ~h.src[0]};
      w.data = h;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) out_word <= w;
  end
endmodule
