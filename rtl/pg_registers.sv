// pg_registers: the host-visible registers of the packet generator.
// The host reaches them over a simple single-word bus: reg_req with reg_wr,
// reg_addr (32-bit word address) and reg_wdata; every request is answered one
// cycle later with reg_ack and, for a read, reg_rdata. Unknown addresses
// read as zero. The register set (global enable, per-port rate and delay
// with their enables, iteration counts, queue sizes, statistics) follows the
// document; the bus and the address map are this design's own:
//
//   0x000 CTRL        bit0 pktgen_en (start/stop sending),
//                     bit 1+i capture on for MAC port i (i = 0..3)
//   0x001 PCAP_LOAD   bit i: host packets for MAC i go to PCAP queue i
//   0x002 PCAP_PORTS  bit i: MAC i sends from its PCAP queue while pktgen_en
//   0x003 COMMAND     write 1 to bit0: clear capture statistics;
//                     bit1: empty all output queues (self-clearing)
//   0x010+2q / 0x011+2q  first / last memory word of output queue q (0..11)
//   0x030+p RATE p    0x038+p RATE_EN p   0x040+p DELAY p  0x048+p DELAY_EN p
//   0x050+i ITERATIONS for PCAP queue i (0..3)
//   read only: 0x080 captured packets, 0x081 captured bytes,
//   0x082/0x083 capture time (ns) low/high, 0x090+i iterations done,
//   0x0A0+q packets stored, 0x0B0+q packets dropped, 0x0C0+p packets sent.
// After reset the memory is split into NUM_Q equal regions, all enables are
// off, every rate is 256 (line rate) and every delay and iteration count 0.
module pg_registers
  import pg_pkg::*;
#(
  parameter int NUM_Q    = 12,
  parameter int NUM_OUT  = 8,
  parameter int NUM_PCAP = 4,
  parameter int ADDR_W   = 19
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               reg_req,
  input  logic               reg_wr,
  input  logic [11:0]        reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic               reg_ack,
  output logic [31:0]        reg_rdata,
  // control
  output logic               pktgen_en,
  output logic [NUM_PCAP-1:0] capture_en,
  output logic [NUM_PCAP-1:0] pcap_load,
  output logic [NUM_PCAP-1:0] use_pcap,
  output logic               stats_clear,
  output logic               oq_init,
  output logic [ADDR_W-1:0]  q_lo [NUM_Q],
  output logic [ADDR_W-1:0]  q_hi [NUM_Q],
  output logic [15:0]        rate      [NUM_OUT],
  output logic               rate_en   [NUM_OUT],
  output logic [31:0]        delay     [NUM_OUT],
  output logic               delay_en  [NUM_OUT],
  output logic [31:0]        iterations[NUM_PCAP],
  // status
  input  logic [31:0]        cap_pkts,
  input  logic [31:0]        cap_bytes,
  input  logic [63:0]        cap_time,
  input  logic [31:0]        iter_cnt     [NUM_PCAP],
  input  logic [31:0]        pkts_stored  [NUM_Q],
  input  logic [31:0]        pkts_dropped [NUM_Q],
  input  logic [31:0]        pkts_sent    [NUM_OUT]
);
  localparam int QS = (2**ADDR_W) / NUM_Q;

  logic [NUM_PCAP-1:0] pcap_ports;
  logic                wr;

  assign wr       = reg_req && reg_wr;
  assign use_pcap = pktgen_en ? pcap_ports : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      pktgen_en   <= 1'b0;
      capture_en  <= '0;
      pcap_load   <= '0;
      pcap_ports  <= '0;
      stats_clear <= 1'b0;
      oq_init     <= 1'b0;
      for (int q = 0; q < NUM_Q; q++) begin
        q_lo[q] <= ADDR_W'(q * QS);
        q_hi[q] <= ADDR_W'(q * QS + QS - 1);
      end
      for (int p = 0; p < NUM_OUT; p++) begin
        rate[p]     <= 16'd256;
        rate_en[p]  <= 1'b0;
        delay[p]    <= '0;
        delay_en[p] <= 1'b0;
      end
      for (int i = 0; i < NUM_PCAP; i++) iterations[i] <= '0;
    end else begin
      stats_clear <= 1'b0;
      oq_init     <= 1'b0;
      if (wr) begin
        if (reg_addr == 12'h000) begin
          pktgen_en  <= reg_wdata[0];
          capture_en <= reg_wdata[NUM_PCAP:1];
        end
        if (reg_addr == 12'h001) pcap_load  <= reg_wdata[NUM_PCAP-1:0];
        if (reg_addr == 12'h002) pcap_ports <= reg_wdata[NUM_PCAP-1:0];
        if (reg_addr == 12'h003) begin
          stats_clear <= reg_wdata[0];
          oq_init     <= reg_wdata[1];
        end
        for (int q = 0; q < NUM_Q; q++) begin
          if (reg_addr == 12'(12'h010 + 2*q)) q_lo[q] <= reg_wdata[ADDR_W-1:0];
          if (reg_addr == 12'(12'h011 + 2*q)) q_hi[q] <= reg_wdata[ADDR_W-1:0];
        end
        for (int p = 0; p < NUM_OUT; p++) begin
          if (reg_addr == 12'(12'h030 + p)) rate[p]     <= reg_wdata[15:0];
          if (reg_addr == 12'(12'h038 + p)) rate_en[p]  <= reg_wdata[0];
          if (reg_addr == 12'(12'h040 + p)) delay[p]    <= reg_wdata;
          if (reg_addr == 12'(12'h048 + p)) delay_en[p] <= reg_wdata[0];
        end
        for (int i = 0; i < NUM_PCAP; i++)
          if (reg_addr == 12'(12'h050 + i)) iterations[i] <= reg_wdata;
      end
    end
  end

  logic [31:0] rd;
  always_comb begin
    rd = '0;
    unique case (reg_addr)
      12'h000: rd = 32'({capture_en, pktgen_en});
      12'h001: rd = 32'(pcap_load);
      12'h002: rd = 32'(pcap_ports);
      12'h080: rd = cap_pkts;
      12'h081: rd = cap_bytes;
      12'h082: rd = cap_time[31:0];
      12'h083: rd = cap_time[63:32];
      default: rd = '0;
    endcase
    for (int q = 0; q < NUM_Q; q++) begin
      if (reg_addr == 12'(12'h010 + 2*q)) rd = 32'(q_lo[q]);
      if (reg_addr == 12'(12'h011 + 2*q)) rd = 32'(q_hi[q]);
      if (reg_addr == 12'(12'h0A0 + q))   rd = pkts_stored[q];
      if (reg_addr == 12'(12'h0B0 + q))   rd = pkts_dropped[q];
    end
    for (int p = 0; p < NUM_OUT; p++) begin
      if (reg_addr == 12'(12'h030 + p)) rd = 32'(rate[p]);
      if (reg_addr == 12'(12'h038 + p)) rd = 32'(rate_en[p]);
      if (reg_addr == 12'(12'h040 + p)) rd = delay[p];
      if (reg_addr == 12'(12'h048 + p)) rd = 32'(delay_en[p]);
      if (reg_addr == 12'(12'h0C0 + p)) rd = pkts_sent[p];
    end
    for (int i = 0; i < NUM_PCAP; i++) begin
      if (reg_addr == 12'(12'h050 + i)) rd = iterations[i];
      if (reg_addr == 12'(12'h090 + i)) rd = iter_cnt[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_ack   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      reg_ack   <= reg_req;
      reg_rdata <= (reg_req && !reg_wr) ? rd : '0;
    end
  end
endmodule
