// tx_queue: one transmit queue (MAC TxQ or CPU TxQ) of the reference
// pipeline. Words are buffered in a DEPTH-word FIFO with the module header
// removed, so the MAC or the host DMA sees only the frame (and, towards the
// host, the W_TS timestamp word of a captured packet ahead of it). Packets
// whose last word has been taken are counted in pkts_sent.
// The queue's place in the pipeline follows the document; its depth and the
// header removal are this design's own choices.
// Interface: valid/ready stream in and out.
// Timing: one cycle from input to output, one word per cycle.
module tx_queue
  import pg_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  pkt_word_t   in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_word_t   out_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] pkts_sent
);
  logic f_ready;
  logic is_hdr;
  logic [$clog2(DEPTH):0] count;

  assign is_hdr   = in_word.kind == W_HDR;
  assign in_ready = is_hdr ? 1'b1 : f_ready;

  sync_fifo #(.W($bits(pkt_word_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .in_data(in_word), .in_valid(in_valid && !is_hdr), .in_ready(f_ready),
    .out_data(out_word), .out_valid(out_valid), .out_ready(out_ready), .count(count));

  always_ff @(posedge clk) begin
    if (rst) pkts_sent <= '0;
    else if (out_valid && out_ready && out_word.eop) pkts_sent <= pkts_sent + 32'd1;
  end
endmodule
