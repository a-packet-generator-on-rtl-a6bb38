// rx_queue: one receive queue (MAC RxQ or CPU RxQ) of the reference pipeline.
// Store and forward: the words of a packet (an optional W_TS word and the
// W_DATA words) are written into a data FIFO while the word and byte counts
// are accumulated; at the last word the counts go into a packet FIFO. The
// output side, when a packet is complete, first sends a module header
// (source port SRC_PORT, word and byte counts, no destination yet) and then
// the stored words. Eight such queues feed the input arbiter, as in the
// document; the depth, the backpressure when full and the header are this
// design's own choices.
// Interface: valid/ready streams of pg_pkg::pkt_word_t.
// Timing: a packet leaves at the earliest one cycle after its last word
// arrived; one word per cycle out, plus the header word.
module rx_queue
  import pg_pkg::*;
#(
  parameter int SRC_PORT   = 0,
  parameter int DATA_DEPTH = 512,
  parameter int PKT_DEPTH  = 32
) (
  input  logic      clk,
  input  logic      rst,
  input  pkt_word_t in_word,
  input  logic      in_valid,
  output logic      in_ready,
  output pkt_word_t out_word,
  output logic      out_valid,
  input  logic      out_ready
);
  localparam int DCW = $clog2(DATA_DEPTH) + 1;
  localparam int PCW = $clog2(PKT_DEPTH) + 1;

  logic [15:0] acc_words, acc_bytes;
  logic        d_in_ready, p_in_ready;
  pkt_word_t   d_out;
  logic        d_out_valid, d_out_ready;
  logic [31:0] p_out;
  logic        p_out_valid, p_out_ready;
  logic [DCW-1:0] d_count;
  logic [PCW-1:0] p_count;
  logic        push;
  logic [15:0] words_now, bytes_now;

  assign in_ready  = d_in_ready && p_in_ready;
  assign push      = in_valid && in_ready;
  assign words_now = acc_words + 16'd1;
  assign bytes_now = acc_bytes + ((in_word.kind == W_DATA) ? 16'(in_word.nbytes_m1) + 16'd1 : 16'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_words <= '0;
      acc_bytes <= '0;
    end else if (push) begin
      acc_words <= in_word.eop ? 16'd0 : words_now;
      acc_bytes <= in_word.eop ? 16'd0 : bytes_now;
    end
  end

  sync_fifo #(.W($bits(pkt_word_t)), .DEPTH(DATA_DEPTH)) u_data (
    .clk, .rst, .in_data(in_word), .in_valid(push), .in_ready(d_in_ready),
    .out_data(d_out), .out_valid(d_out_valid), .out_ready(d_out_ready), .count(d_count));

  sync_fifo #(.W(32), .DEPTH(PKT_DEPTH)) u_pkt (
    .clk, .rst, .in_data({words_now, bytes_now}), .in_valid(push && in_word.eop),
    .in_ready(p_in_ready), .out_data(p_out), .out_valid(p_out_valid),
    .out_ready(p_out_ready), .count(p_count));

  // Output: header, then the packet's words up to and including eop.
  logic sending;
  always_ff @(posedge clk) begin
    if (rst) sending <= 1'b0;
    else if (!sending && p_out_valid && out_ready) sending <= 1'b1;
    else if (sending && d_out_valid && out_ready && d_out.eop) sending <= 1'b0;
  end

  always_comb begin
    if (!sending) begin
      out_word    = make_hdr(16'd0, p_out[31:16], 16'(SRC_PORT), p_out[15:0]);
      out_valid   = p_out_valid;
      d_out_ready = 1'b0;
      p_out_ready = 1'b0;
    end else begin
      out_word    = d_out;
      out_valid   = d_out_valid;
      d_out_ready = out_ready;
      p_out_ready = out_ready && d_out_valid && d_out.eop;
    end
  end
endmodule
