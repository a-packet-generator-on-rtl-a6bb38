// packet_generator_top: packet generator and capture pipeline for a
// four-port Gigabit Ethernet board.
// Receive: MAC frames are timestamped (timestamp) and buffered in four MAC
// receive queues; host frames arrive in four CPU receive queues (rx_queue).
// input_arbiter merges the eight queues round robin onto one 64-bit stream.
// output_port_lookup sends MAC i traffic to CPU i and CPU i traffic to MAC i.
// packet_capture counts captured traffic and removes timestamps when capture
// is off. output_queues holds twelve queues in one packet memory: eight
// reference queues and four PCAP queues that are loaded from the host and
// replayed a set number of times. pktgen_output_select gives each MAC port
// either its reference queue or its PCAP queue. Each of the eight output
// ports then passes a rate_limiter and a delay_module into its tx_queue.
// pg_registers holds all settings and statistics for the host.
// Ports: MAC and host streams (pg_pkg::pkt_word_t with valid/ready, port
// index i = MAC/CPU i) and the host register bus. All in one clock domain.
// The block structure and their order follow the document; everything at
// signal level is this design's own (see each module).
module packet_generator_top
  import pg_pkg::*;
#(
  parameter int OQ_ADDR_W = 19
) (
  input  logic        clk,
  input  logic        rst,
  input  pkt_word_t   mac_rx_word  [NUM_MAC],
  input  logic        mac_rx_valid [NUM_MAC],
  output logic        mac_rx_ready [NUM_MAC],
  input  pkt_word_t   cpu_rx_word  [NUM_MAC],
  input  logic        cpu_rx_valid [NUM_MAC],
  output logic        cpu_rx_ready [NUM_MAC],
  output pkt_word_t   mac_tx_word  [NUM_MAC],
  output logic        mac_tx_valid [NUM_MAC],
  input  logic        mac_tx_ready [NUM_MAC],
  output pkt_word_t   cpu_tx_word  [NUM_MAC],
  output logic        cpu_tx_valid [NUM_MAC],
  input  logic        cpu_tx_ready [NUM_MAC],
  input  logic        reg_req,
  input  logic        reg_wr,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic        reg_ack,
  output logic [31:0] reg_rdata
);
  // Timestamp -> MAC receive queues.
  pkt_word_t ts_word  [NUM_MAC];
  logic      ts_valid [NUM_MAC];
  logic      ts_ready [NUM_MAC];
  logic [63:0] now;

  timestamp #(.NPORTS(NUM_MAC)) u_ts (
    .clk, .rst, .in_word(mac_rx_word), .in_valid(mac_rx_valid), .in_ready(mac_rx_ready),
    .out_word(ts_word), .out_valid(ts_valid), .out_ready(ts_ready), .now(now));

  // Eight receive queues, port 2i = MAC i, port 2i+1 = CPU i.
  pkt_word_t rq_word  [NUM_PORTS];
  logic      rq_valid [NUM_PORTS];
  logic      rq_ready [NUM_PORTS];

  for (genvar i = 0; i < NUM_MAC; i++) begin : g_rxq
    rx_queue #(.SRC_PORT(2*i)) u_mac_rxq (
      .clk, .rst, .in_word(ts_word[i]), .in_valid(ts_valid[i]), .in_ready(ts_ready[i]),
      .out_word(rq_word[2*i]), .out_valid(rq_valid[2*i]), .out_ready(rq_ready[2*i]));
    rx_queue #(.SRC_PORT(2*i+1)) u_cpu_rxq (
      .clk, .rst, .in_word(cpu_rx_word[i]), .in_valid(cpu_rx_valid[i]), .in_ready(cpu_rx_ready[i]),
      .out_word(rq_word[2*i+1]), .out_valid(rq_valid[2*i+1]), .out_ready(rq_ready[2*i+1]));
  end

  // User data path.
  pkt_word_t ia_word, opl_word, pc_word;
  logic      ia_valid, ia_ready, opl_valid, opl_ready, pc_valid, pc_ready;

  input_arbiter #(.NUM_IN(NUM_PORTS)) u_arb (
    .clk, .rst, .in_word(rq_word), .in_valid(rq_valid), .in_ready(rq_ready),
    .out_word(ia_word), .out_valid(ia_valid), .out_ready(ia_ready));

  output_port_lookup u_opl (
    .clk, .rst, .in_word(ia_word), .in_valid(ia_valid), .in_ready(ia_ready),
    .out_word(opl_word), .out_valid(opl_valid), .out_ready(opl_ready));

  // Registers.
  logic pktgen_en, stats_clear, oq_init;
  logic [NUM_MAC-1:0] capture_en;
  logic [NUM_MAC-1:0] pcap_load, use_pcap, sel_pcap;
  logic [OQ_ADDR_W-1:0] q_lo [NUM_OQ];
  logic [OQ_ADDR_W-1:0] q_hi [NUM_OQ];
  logic [15:0] rate     [NUM_PORTS];
  logic        rate_en  [NUM_PORTS];
  logic [31:0] delay    [NUM_PORTS];
  logic        delay_en [NUM_PORTS];
  logic [31:0] iterations [NUM_MAC];
  logic [31:0] iter_cnt   [NUM_MAC];
  logic [31:0] pkts_stored  [NUM_OQ];
  logic [31:0] pkts_dropped [NUM_OQ];
  logic [31:0] pkts_sent    [NUM_PORTS];
  logic [31:0] cap_pkts, cap_bytes, ts_stripped;
  logic [63:0] first_ts, last_ts, cap_time;

  packet_capture u_cap (
    .clk, .rst, .in_word(opl_word), .in_valid(opl_valid), .in_ready(opl_ready),
    .out_word(pc_word), .out_valid(pc_valid), .out_ready(pc_ready),
    .capture_en, .stats_clear, .pkt_cnt(cap_pkts), .byte_cnt(cap_bytes),
    .first_ts, .last_ts, .capture_time(cap_time), .ts_stripped);

  pkt_word_t oq_word  [NUM_OQ];
  logic      oq_valid [NUM_OQ];
  logic      oq_ready [NUM_OQ];

  output_queues #(.NUM_Q(NUM_OQ), .NUM_PCAP(NUM_MAC), .ADDR_W(OQ_ADDR_W)) u_oq (
    .clk, .rst, .in_word(pc_word), .in_valid(pc_valid), .in_ready(pc_ready),
    .q_lo, .q_hi, .oq_init, .pcap_load, .pktgen_en, .iterations,
    .out_word(oq_word), .out_valid(oq_valid), .out_ready(oq_ready),
    .iter_cnt, .pkts_stored, .pkts_dropped);

  pkt_word_t os_word  [NUM_PORTS];
  logic      os_valid [NUM_PORTS];
  logic      os_ready [NUM_PORTS];

  pktgen_output_select #(.NUM_Q(NUM_OQ), .NUM_OUT(NUM_PORTS), .NUM_PCAP(NUM_MAC)) u_sel (
    .clk, .rst, .use_pcap, .in_word(oq_word), .in_valid(oq_valid), .in_ready(oq_ready),
    .out_word(os_word), .out_valid(os_valid), .out_ready(os_ready), .sel_pcap);

  // Per output port: rate limiter -> delay -> transmit queue.
  pkt_word_t rl_word  [NUM_PORTS];
  logic      rl_valid [NUM_PORTS];
  logic      rl_ready [NUM_PORTS];
  pkt_word_t dl_word  [NUM_PORTS];
  logic      dl_valid [NUM_PORTS];
  logic      dl_ready [NUM_PORTS];
  pkt_word_t tq_word  [NUM_PORTS];
  logic      tq_valid [NUM_PORTS];
  logic      tq_ready [NUM_PORTS];
  logic [31:0] rl_held [NUM_PORTS];
  logic [31:0] dl_held [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    rate_limiter u_rl (
      .clk, .rst, .enable(rate_en[p]), .rate(rate[p]),
      .in_word(os_word[p]), .in_valid(os_valid[p]), .in_ready(os_ready[p]),
      .out_word(rl_word[p]), .out_valid(rl_valid[p]), .out_ready(rl_ready[p]),
      .held_cycles(rl_held[p]));
    delay_module u_dl (
      .clk, .rst, .enable(delay_en[p]), .delay(delay[p]),
      .in_word(rl_word[p]), .in_valid(rl_valid[p]), .in_ready(rl_ready[p]),
      .out_word(dl_word[p]), .out_valid(dl_valid[p]), .out_ready(dl_ready[p]),
      .held_cycles(dl_held[p]));
    tx_queue u_txq (
      .clk, .rst, .in_word(dl_word[p]), .in_valid(dl_valid[p]), .in_ready(dl_ready[p]),
      .out_word(tq_word[p]), .out_valid(tq_valid[p]), .out_ready(tq_ready[p]),
      .pkts_sent(pkts_sent[p]));
  end

  for (genvar i = 0; i < NUM_MAC; i++) begin : g_io
    assign mac_tx_word[i]  = tq_word[2*i];
    assign mac_tx_valid[i] = tq_valid[2*i];
    assign tq_ready[2*i]   = mac_tx_ready[i];
    assign cpu_tx_word[i]  = tq_word[2*i+1];
    assign cpu_tx_valid[i] = tq_valid[2*i+1];
    assign tq_ready[2*i+1] = cpu_tx_ready[i];
  end

  pg_registers #(.NUM_Q(NUM_OQ), .NUM_OUT(NUM_PORTS), .NUM_PCAP(NUM_MAC), .ADDR_W(OQ_ADDR_W)) u_regs (
    .clk, .rst, .reg_req, .reg_wr, .reg_addr, .reg_wdata, .reg_ack, .reg_rdata,
    .pktgen_en, .capture_en, .pcap_load, .use_pcap, .stats_clear, .oq_init,
    .q_lo, .q_hi, .rate, .rate_en, .delay, .delay_en, .iterations,
    .cap_pkts, .cap_bytes, .cap_time, .iter_cnt, .pkts_stored, .pkts_dropped, .pkts_sent);
endmodule
