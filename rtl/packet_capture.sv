// packet_capture: capture statistics and timestamp removal.
// It watches every packet in the pipeline. A packet whose header names a MAC
// port as its source (even source index) carries a W_TS word right after the
// header. Capture is switched on per MAC port (capture_en bit i for MAC i).
// While it is on for the packet's port, such packets keep their timestamp (the host
// uses it to write the capture file) and are counted: packets, frame bytes,
// and the first and last timestamp seen, whose difference is the capture
// time. While it is off the timestamp word is removed and the
// header's word_len is reduced by one, so the board behaves as a plain NIC.
// Collecting run statistics and stripping timestamps when disabled follow the
// document; which figures are collected beyond packets and capture time, and
// the capture-time definition, are this design's own choices.
// The document makes capture a per-port option, as here. capture_en is
// sampled at each header, so a change never splits a packet.
// Interface: valid/ready stream in and out; stats_clear zeroes the statistics.
// Timing: combinational, one word per cycle; a stripped TS word is consumed
// without an output cycle.
module packet_capture
  import pg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  pkt_word_t   in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_word_t   out_word,
  output logic        out_valid,
  input  logic        out_ready,
  input  logic [NUM_MAC-1:0] capture_en,
  input  logic        stats_clear,
  output logic [31:0] pkt_cnt,
  output logic [31:0] byte_cnt,
  output logic [63:0] first_ts,
  output logic [63:0] last_ts,
  output logic [63:0] capture_time,
  output logic [31:0] ts_stripped
);
  logic        pkt_keep;     // current packet keeps its TS word
  logic [15:0] pkt_bytes;
  logic        have_first;
  hdr_t        h;
  logic        is_mac_hdr;
  logic        drop_word;
  logic        cap_this;     // capture is on for this header's MAC port

  assign h          = get_hdr(in_word);
  assign is_mac_hdr = (in_word.kind == W_HDR) && !h.src[0];
  assign cap_this   = capture_en[h.src[$clog2(NUM_MAC):1]];
  assign drop_word  = (in_word.kind == W_TS) && !pkt_keep;

  hdr_t hn;

  always_comb begin
    hn          = h;
    hn.word_len = h.word_len - 16'd1;
    out_word    = in_word;
    if (is_mac_hdr && !cap_this) out_word.data = hn;
    out_valid = in_valid && !drop_word;
    in_ready  = drop_word ? 1'b1 : out_ready;
  end

  assign capture_time = have_first ? (last_ts - first_ts) : 64'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_keep  <= 1'b0;
      pkt_bytes <= '0;
    end else if (in_valid && in_ready && in_word.kind == W_HDR) begin
      pkt_keep  <= cap_this;
      pkt_bytes <= h.byte_len;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || stats_clear) begin
      have_first  <= 1'b0;
      pkt_cnt     <= '0;
      byte_cnt    <= '0;
      first_ts    <= '0;
      last_ts     <= '0;
      ts_stripped <= '0;
    end else if (in_valid && in_ready) begin
      if (in_word.kind == W_TS) begin
        if (pkt_keep) begin
          pkt_cnt  <= pkt_cnt + 32'd1;
          byte_cnt <= byte_cnt + 32'(pkt_bytes);
          last_ts  <= in_word.data;
          if (!have_first) begin
            first_ts   <= in_word.data;
            have_first <= 1'b1;
          end
        end else begin
          ts_stripped <= ts_stripped + 32'd1;
        end
      end
    end
  end
endmodule
