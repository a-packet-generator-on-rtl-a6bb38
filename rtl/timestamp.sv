// timestamp: receive timestamping in front of the MAC receive queues.
// A free-running counter keeps the time in nanoseconds (NS_PER_CYCLE is added
// every clock). For each of the NPORTS MAC receive streams, when the first
// word of a packet is offered the module first emits a W_TS word holding the
// time at that moment, then passes the packet words through unchanged.
// Stamping arriving packets before the MAC FIFOs follows the document; the
// nanosecond unit, the 64-bit width and carrying the stamp as a separate word
// ahead of the frame are this design's own choices.
// Interface: per port a valid/ready stream in and out (pg_pkg::pkt_word_t).
// Timing: combinational pass-through; one extra output cycle per packet for
// the timestamp word.
module timestamp
  import pg_pkg::*;
#(
  parameter int NPORTS    = 4,
  parameter int NS_PER_CYCLE = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  pkt_word_t in_word  [NPORTS],
  input  logic      in_valid [NPORTS],
  output logic      in_ready [NPORTS],
  output pkt_word_t out_word [NPORTS],
  output logic      out_valid[NPORTS],
  input  logic      out_ready[NPORTS],
  output logic [63:0] now
);
  logic [NPORTS-1:0] in_pkt;   // timestamp already sent for current packet

  always_ff @(posedge clk) begin
    if (rst) now <= '0;
    else     now <= now + 64'(NS_PER_CYCLE);
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    always_comb begin
      if (!in_pkt[p]) begin
        out_word[p].kind      = W_TS;
        out_word[p].eop       = 1'b0;
        out_word[p].nbytes_m1 = 3'd7;
        out_word[p].data      = now;
        out_valid[p]          = in_valid[p];
        in_ready[p]           = 1'b0;
      end else begin
        out_word[p]  = in_word[p];
        out_valid[p] = in_valid[p];
        in_ready[p]  = out_ready[p];
      end
    end

    always_ff @(posedge clk) begin
      if (rst) in_pkt[p] <= 1'b0;
      else if (!in_pkt[p] && in_valid[p] && out_ready[p]) in_pkt[p] <= 1'b1;
      else if (in_pkt[p] && in_valid[p] && out_ready[p] && in_word[p].eop) in_pkt[p] <= 1'b0;
    end
  end
endmodule
