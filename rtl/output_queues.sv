// output_queues: twelve packet queues in one shared packet memory.
// Queues 0..7 are the reference output queues (queue p feeds output port p).
// Queues NUM_Q-NUM_PCAP.. NUM_Q-1 (8..11) hold the PCAP data for MAC ports
// 0..3. Each queue owns the memory region [q_lo[q], q_hi[q]] (inclusive), set
// by software, so queue sizes follow the PCAP file sizes. Twelve queues in the
// memory and register-set sizes follow the document; the memory is an on-chip
// array here in place of the board's SRAM.
//
// Write side: the header of each arriving packet picks the queue from its
// one-hot destination (lowest set bit). A packet for MAC port i goes to PCAP
// queue 8+i instead while pcap_load[i] is set; this is how the host loads a
// PCAP file. If the whole packet (header + word_len words) does not fit in
// the free space of its queue it is dropped and counted. One word is written
// per cycle and the input is always ready.
//
// Read side: a reference queue is a circular buffer; words are freed as they
// are read. A PCAP queue keeps its contents: it is read from the start of its
// region to the last stored word, once per iteration, while pktgen_en is set,
// until iter_cnt reaches iterations. A rising edge of pktgen_en restarts the
// replay from the first packet with iter_cnt = 0. A PCAP queue never starts a
// new packet while pktgen_en is clear, but always finishes one it started.
// Every cycle one queue is chosen round robin among those with a word to read
// and room in their OUT_FIFO_DEPTH-word output FIFO; the memory read takes one
// cycle, and a queue is not chosen two cycles in a row (so each queue gets up
// to half the memory bandwidth, 4 Gb/s at 125 MHz, above the 1 Gb/s line).
// The drop policy, the load routing, the replay rules and the read scheduling
// are this design's own choices.
// oq_init (one cycle) empties every queue, e.g. after the regions change.
module output_queues
  import pg_pkg::*;
#(
  parameter int NUM_Q          = 12,
  parameter int NUM_PCAP       = 4,
  parameter int ADDR_W         = 19,
  parameter int OUT_FIFO_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  pkt_word_t          in_word,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [ADDR_W-1:0]  q_lo [NUM_Q],
  input  logic [ADDR_W-1:0]  q_hi [NUM_Q],
  input  logic               oq_init,
  input  logic [NUM_PCAP-1:0] pcap_load,
  input  logic               pktgen_en,
  input  logic [31:0]        iterations [NUM_PCAP],
  output pkt_word_t          out_word  [NUM_Q],
  output logic               out_valid [NUM_Q],
  input  logic               out_ready [NUM_Q],
  output logic [31:0]        iter_cnt  [NUM_PCAP],
  output logic [31:0]        pkts_stored  [NUM_Q],
  output logic [31:0]        pkts_dropped [NUM_Q]
);
  localparam int PB  = NUM_Q - NUM_PCAP;      // first PCAP queue
  localparam int QW  = $clog2(NUM_Q);
  localparam int FCW = $clog2(OUT_FIFO_DEPTH) + 1;
  localparam int CW  = ADDR_W + 1;

  typedef enum logic [1:0] {WS_IDLE, WS_STORE, WS_DROP} wstate_e;

  pkt_word_t mem [2**ADDR_W];

  logic [ADDR_W-1:0] wr_ptr [NUM_Q];
  logic [ADDR_W-1:0] rd_ptr [NUM_Q];
  logic [CW-1:0]     cnt    [NUM_Q];    // words held (reference) / stored (PCAP)
  logic [15:0]       rd_rem [NUM_Q];    // words left in the packet being read
  logic [CW-1:0]     play_idx [NUM_PCAP];
  logic [NUM_PCAP-1:0] restart;
  logic              en_q;

  // ---------------- write side ----------------
  wstate_e   ws;
  logic [QW-1:0] wq;
  hdr_t      h;
  logic [QW-1:0] dq;
  logic      dq_ok;
  logic [CW-1:0] size_dq, need;
  logic      wr_en;
  logic [QW-1:0] wr_q;

  assign in_ready = 1'b1;
  assign h        = get_hdr(in_word);

  function automatic logic [CW-1:0] qsize(logic [ADDR_W-1:0] lo, logic [ADDR_W-1:0] hi);
    return (hi >= lo) ? (CW'(hi) - CW'(lo) + CW'(1)) : '0;
  endfunction

  always_comb begin
    dq    = '0;
    dq_ok = 1'b0;
    for (int p = NUM_PORTS - 1; p >= 0; p--) begin
      if (h.dst[p]) begin
        dq_ok = 1'b1;
        if ((p % 2 == 0) && (p / 2 < NUM_PCAP) && pcap_load[p/2]) dq = QW'(PB + p / 2);
        else                                                     dq = QW'(p);
      end
    end
    size_dq = qsize(q_lo[dq], q_hi[dq]);
    need    = CW'(h.word_len) + CW'(1);
  end

  logic hdr_now, hdr_fits;
  assign hdr_now  = in_valid && ws == WS_IDLE && in_word.kind == W_HDR;
  assign hdr_fits = dq_ok && (size_dq - cnt[dq] >= need) && (size_dq >= need);
  assign wr_en    = in_valid && ((hdr_now && hdr_fits) || ws == WS_STORE);
  assign wr_q     = (ws == WS_STORE) ? wq : dq;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[wr_q]] <= in_word;
  end

  always_ff @(posedge clk) begin
    if (rst || oq_init) begin
      ws <= WS_IDLE;
      wq <= '0;
      for (int q = 0; q < NUM_Q; q++) begin
        pkts_stored[q]  <= '0;
        pkts_dropped[q] <= '0;
      end
    end else if (in_valid) begin
      unique case (ws)
        WS_IDLE: if (in_word.kind == W_HDR) begin
          wq <= dq;
          if (hdr_fits) begin
            ws <= WS_STORE;
            pkts_stored[dq] <= pkts_stored[dq] + 32'd1;
          end else begin
            ws <= WS_DROP;
            if (dq_ok) pkts_dropped[dq] <= pkts_dropped[dq] + 32'd1;
          end
        end
        WS_STORE: if (in_word.eop) ws <= WS_IDLE;
        WS_DROP:  if (in_word.eop) ws <= WS_IDLE;
        default:  ws <= WS_IDLE;
      endcase
    end
  end

  // ---------------- read side ----------------
  logic [FCW-1:0] f_count [NUM_Q];
  logic           f_in_ready [NUM_Q];
  logic [NUM_Q-1:0] readable, eligible;
  logic           rd_pend;
  logic [QW-1:0]  rd_q_d, last_q, pick;
  logic           found;
  pkt_word_t      rd_data;
  logic [ADDR_W-1:0] rd_addr;
  logic [NUM_PCAP-1:0] running, wrap;

  always_comb begin
    for (int i = 0; i < NUM_PCAP; i++) begin
      running[i] = pktgen_en && en_q && (iter_cnt[i] < iterations[i]) && !restart[i];
      wrap[i]    = running[i] && rd_rem[PB+i] == '0 && !(rd_pend && rd_q_d == QW'(PB+i))
                   && cnt[PB+i] != '0 && play_idx[i] == cnt[PB+i];
    end
    for (int q = 0; q < NUM_Q; q++) begin
      if (q >= PB)
        readable[q] = (play_idx[q-PB] < cnt[q]) && (rd_rem[q] != '0 || running[q-PB]);
      else
        readable[q] = (cnt[q] != '0);
      eligible[q] = readable[q] && !(rd_pend && rd_q_d == QW'(q))
                    && (32'(f_count[q]) + ((rd_pend && rd_q_d == QW'(q)) ? 1 : 0) < OUT_FIFO_DEPTH);
    end
    found = 1'b0;
    pick  = last_q;
    for (int k = 1; k <= NUM_Q; k++) begin
      logic [QW-1:0] idx;
      idx = QW'((32'(last_q) + k) % NUM_Q);
      if (!found && eligible[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
    rd_addr = rd_ptr[pick];
    for (int i = 0; i < NUM_PCAP; i++)
      if (pick == QW'(PB + i)) rd_addr = q_lo[pick] + ADDR_W'(play_idx[i]);
  end

  always_ff @(posedge clk) begin
    if (found) rd_data <= mem[rd_addr];
  end

  // Pointer, count and replay state.
  always_ff @(posedge clk) begin
    if (rst || oq_init) begin
      rd_pend <= 1'b0;
      rd_q_d  <= '0;
      last_q  <= QW'(NUM_Q - 1);
      en_q    <= 1'b0;
      restart <= '0;
      for (int q = 0; q < NUM_Q; q++) begin
        wr_ptr[q] <= q_lo[q];
        rd_ptr[q] <= q_lo[q];
        cnt[q]    <= '0;
        rd_rem[q] <= '0;
      end
      for (int i = 0; i < NUM_PCAP; i++) begin
        play_idx[i] <= '0;
        iter_cnt[i] <= '0;
      end
    end else begin
      en_q    <= pktgen_en;
      rd_pend <= found;
      rd_q_d  <= pick;
      if (found) last_q <= pick;

      for (int q = 0; q < NUM_Q; q++) begin
        logic inc, dec;
        inc = wr_en && (wr_q == QW'(q));
        dec = found && (pick == QW'(q)) && (q < PB);
        if (inc) wr_ptr[q] <= (wr_ptr[q] == q_hi[q]) ? q_lo[q] : wr_ptr[q] + 1'b1;
        if (dec) rd_ptr[q] <= (rd_ptr[q] == q_hi[q]) ? q_lo[q] : rd_ptr[q] + 1'b1;
        if (inc && !dec) cnt[q] <= cnt[q] + 1'b1;
        else if (dec && !inc) cnt[q] <= cnt[q] - 1'b1;
        if (rd_pend && rd_q_d == QW'(q))
          rd_rem[q] <= (rd_data.kind == W_HDR) ? get_hdr(rd_data).word_len : rd_rem[q] - 16'd1;
      end

      for (int i = 0; i < NUM_PCAP; i++) begin
        if (pktgen_en && !en_q) restart[i] <= 1'b1;
        if (restart[i] && rd_rem[PB+i] == '0 && !(rd_pend && rd_q_d == QW'(PB+i))
            && !(found && pick == QW'(PB+i))) begin
          restart[i]  <= 1'b0;
          play_idx[i] <= '0;
          iter_cnt[i] <= '0;
        end else if (found && pick == QW'(PB+i)) begin
          play_idx[i] <= play_idx[i] + 1'b1;
        end else if (wrap[i]) begin
          play_idx[i] <= '0;
          iter_cnt[i] <= iter_cnt[i] + 32'd1;
        end
      end
    end
  end

  // Per-queue output FIFOs.
  for (genvar q = 0; q < NUM_Q; q++) begin : g_out
    sync_fifo #(.W($bits(pkt_word_t)), .DEPTH(OUT_FIFO_DEPTH)) u_fifo (
      .clk, .rst(rst || oq_init),
      .in_data(rd_data), .in_valid(rd_pend && rd_q_d == QW'(q)), .in_ready(f_in_ready[q]),
      .out_data(out_word[q]), .out_valid(out_valid[q]), .out_ready(out_ready[q]),
      .count(f_count[q]));
  end

  // The credit check must keep a returning word from finding its FIFO full.
  for (genvar q = 0; q < NUM_Q; q++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (rst)
      (rd_pend && rd_q_d == QW'(q)) |-> f_in_ready[q]);
  end
endmodule
