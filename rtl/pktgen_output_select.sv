// pktgen_output_select: connects the twelve output queues to the eight output
// ports. Output port p normally takes queue p. MAC port i (output port 2i)
// takes PCAP queue NUM_Q-NUM_PCAP+i instead while use_pcap[i] is set, so each
// MAC port has two transmit queues: one can be sent from while the other is
// being loaded. Multiplexing the 12 queues onto the 8 ports follows the
// document; which queue goes where and switching only between packets are
// this design's own choices.
// The choice for a MAC port is taken when no packet is in progress on it and
// is held until that packet's eop word has passed, so packets never mix. A
// queue that is not selected sees out_ready low and waits.
// Timing: combinational, no added latency.
module pktgen_output_select
  import pg_pkg::*;
#(
  parameter int NUM_Q    = 12,
  parameter int NUM_OUT  = 8,
  parameter int NUM_PCAP = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NUM_PCAP-1:0] use_pcap,
  input  pkt_word_t     in_word  [NUM_Q],
  input  logic          in_valid [NUM_Q],
  output logic          in_ready [NUM_Q],
  output pkt_word_t     out_word [NUM_OUT],
  output logic          out_valid[NUM_OUT],
  input  logic          out_ready[NUM_OUT],
  output logic [NUM_PCAP-1:0] sel_pcap
);
  localparam int PB = NUM_Q - NUM_PCAP;

  logic [NUM_PCAP-1:0] sel_q, in_pkt;

  always_comb begin
    for (int q = 0; q < NUM_Q; q++) in_ready[q] = 1'b0;
    for (int p = 0; p < NUM_OUT; p++) begin
      if ((p % 2 == 0) && (p / 2 < NUM_PCAP) && sel_pcap[p/2]) begin
        out_word[p]       = in_word[PB + p/2];
        out_valid[p]      = in_valid[PB + p/2];
        in_ready[PB + p/2] = out_ready[p];
      end else begin
        out_word[p]  = in_word[p];
        out_valid[p] = in_valid[p];
        in_ready[p]  = out_ready[p];
      end
    end
  end

  // Between packets the new choice applies at once.
  assign sel_pcap = (in_pkt & sel_q) | (~in_pkt & use_pcap);

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q  <= '0;
      in_pkt <= '0;
    end else begin
      for (int i = 0; i < NUM_PCAP; i++) begin
        sel_q[i] <= sel_pcap[i];
        if (out_valid[2*i] && out_ready[2*i]) in_pkt[i] <= !out_word[2*i].eop;
      end
    end
  end
endmodule
