// pg_pkg: types and constants shared by the packet generator pipeline.
//
// Every stream in the user data path carries 64-bit words tagged with a kind.
// A packet inside the pipeline is: one module header word (W_HDR), an optional
// timestamp word (W_TS, only for packets received on a MAC port), then the
// Ethernet frame as W_DATA words. The last word has eop set and nbytes_m1 gives
// the number of valid bytes in it minus one (bytes are packed from bit 63 down).
// The 64-bit width and the 8 input / 12 output queue counts follow the
// document; the word tags and the header layout are this design's own.
//
// Header word layout:
//   [63:48] destination port, one-hot (bit p = output port p, 0..7)
//   [47:32] word_len: number of words that follow the header (TS + DATA)
//   [31:16] source port index (MAC i = 2i, CPU i = 2i+1)
//   [15:0]  byte_len: bytes of frame data (timestamp word not counted)
package pg_pkg;

  localparam int NUM_MAC   = 4;   // Gigabit Ethernet ports
  localparam int NUM_PORTS = 8;   // MAC + CPU queues
  localparam int NUM_OQ    = 12;  // output queues: 8 reference + 4 PCAP
  localparam int DATA_W    = 64;

  typedef enum logic [1:0] {
    W_HDR  = 2'd0,
    W_TS   = 2'd1,
    W_DATA = 2'd2
  } word_kind_e;

  typedef struct packed {
    word_kind_e        kind;
    logic              eop;
    logic [2:0]        nbytes_m1;
    logic [DATA_W-1:0] data;
  } pkt_word_t;

  typedef struct packed {
    logic [15:0] dst;
    logic [15:0] word_len;
    logic [15:0] src;
    logic [15:0] byte_len;
  } hdr_t;

  function automatic pkt_word_t make_hdr(logic [15:0] dst, logic [15:0] word_len,
                                         logic [15:0] src, logic [15:0] byte_len);
    pkt_word_t w;
    w.kind      = W_HDR;
    w.eop       = 1'b0;
    w.nbytes_m1 = 3'd7;
    w.data      = {dst, word_len, src, byte_len};
    return w;
  endfunction

  function automatic hdr_t get_hdr(pkt_word_t w);
    return hdr_t'(w.data);
  endfunction

endpackage
