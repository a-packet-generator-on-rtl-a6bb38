// tb_pg_registers: checks the reset values, write then read-back of every
// control register, that each write reaches the matching control output,
// that the command bits give one-cycle pulses, that the PCAP port select is
// only active while the global enable is set, and that the status inputs
// are readable at their addresses. Every access must be acknowledged one
// cycle after the request.
module tb_pg_registers;
  import pg_pkg::*;
  localparam int NQ = 12, NO = 8, NPC = 4, AW = 10;
  logic clk = 0, rst = 1;
  logic reg_req, reg_wr, reg_ack;
  logic [11:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic pktgen_en, stats_clear, oq_init;
  logic [NPC-1:0] capture_en;
  logic [NPC-1:0] pcap_load, use_pcap;
  logic [AW-1:0] q_lo [NQ];
  logic [AW-1:0] q_hi [NQ];
  logic [15:0] rate [NO];
  logic rate_en [NO];
  logic [31:0] delay [NO];
  logic delay_en [NO];
  logic [31:0] iterations [NPC];
  logic [31:0] cap_pkts, cap_bytes;
  logic [63:0] cap_time;
  logic [31:0] iter_cnt [NPC];
  logic [31:0] pkts_stored [NQ];
  logic [31:0] pkts_dropped [NQ];
  logic [31:0] pkts_sent [NO];
  int checks = 0, failures = 0;
  int pulses_clear = 0, pulses_init = 0;

  pg_registers #(.NUM_Q(NQ), .NUM_OUT(NO), .NUM_PCAP(NPC), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (stats_clear) pulses_clear++;
    if (oq_init) pulses_init++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    reg_req = 1; reg_wr = 1; reg_addr = 12'(a); reg_wdata = d;
    @(negedge clk);
    reg_req = 0; reg_wr = 0;
    check(reg_ack, "write acknowledged");
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    reg_req = 1; reg_wr = 0; reg_addr = 12'(a);
    @(negedge clk);
    reg_req = 0;
    check(reg_ack, "read acknowledged");
    d = reg_rdata;
  endtask

  task automatic expect_rd(input int a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    check(d == e, $sformatf("read %h = %h exp %h", a, d, e));
  endtask

  initial begin
    logic [31:0] v;
    reg_req = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0;
    cap_pkts = 32'd11; cap_bytes = 32'd2222; cap_time = 64'h0000_0005_0000_0033;
    for (int i = 0; i < NPC; i++) iter_cnt[i] = 32'(40 + i);
    for (int q = 0; q < NQ; q++) begin pkts_stored[q] = 32'(100 + q); pkts_dropped[q] = 32'(200 + q); end
    for (int p = 0; p < NO; p++) pkts_sent[p] = 32'(300 + p);
    repeat (2) @(negedge clk);
    rst = 0;
    // Reset values: memory split in equal parts (1024/12 = 85 words each).
    for (int q = 0; q < NQ; q++) begin
      check(q_lo[q] == AW'(q * 85) && q_hi[q] == AW'(q * 85 + 84), $sformatf("q%0d default region", q));
      expect_rd(16 + 2 * q, 32'(q * 85));
    end
    check(!pktgen_en && capture_en == 0 && rate[3] == 16'd256 && !rate_en[3] && delay[5] == 0, "reset values");
    // Control registers.
    wr(12'h001, 32'h5);
    check(pcap_load == 4'h5, "pcap_load");
    wr(12'h002, 32'hA);
    check(use_pcap == 4'h0, "use_pcap gated by pktgen_en");
    wr(12'h000, 32'h13);
    check(pktgen_en && capture_en == 4'b1001 && use_pcap == 4'hA, "enables");
    expect_rd(12'h000, 32'h13);
    wr(12'h000, 32'h0C);
    check(!pktgen_en && capture_en == 4'b0110 && use_pcap == 4'h0, "global enable off");
    for (int q = 0; q < NQ; q++) begin
      wr(16 + 2 * q, 32'(q * 50));
      wr(17 + 2 * q, 32'(q * 50 + 49));
    end
    for (int q = 0; q < NQ; q++) begin
      check(q_lo[q] == AW'(q * 50) && q_hi[q] == AW'(q * 50 + 49), "queue region written");
      expect_rd(17 + 2 * q, 32'(q * 50 + 49));
    end
    for (int p = 0; p < NO; p++) begin
      wr(12'h030 + p, 32'(1000 + p));
      wr(12'h038 + p, 32'(p % 2));
      wr(12'h040 + p, 32'(5000 + p));
      wr(12'h048 + p, 32'((p + 1) % 2));
    end
    for (int p = 0; p < NO; p++) begin
      check(rate[p] == 16'(1000 + p) && rate_en[p] == (p % 2 == 1), $sformatf("rate %0d", p));
      check(delay[p] == 32'(5000 + p) && delay_en[p] == (p % 2 == 0), $sformatf("delay %0d", p));
      expect_rd(12'h040 + p, 32'(5000 + p));
      expect_rd(12'h030 + p, 32'(1000 + p));
      expect_rd(12'h0C0 + p, 32'(300 + p));
    end
    for (int i = 0; i < NPC; i++) wr(12'h050 + i, 32'(7 + i));
    for (int i = 0; i < NPC; i++) begin
      check(iterations[i] == 32'(7 + i), "iterations");
      expect_rd(12'h050 + i, 32'(7 + i));
      expect_rd(12'h090 + i, 32'(40 + i));
    end
    for (int q = 0; q < NQ; q++) begin
      expect_rd(12'h0A0 + q, 32'(100 + q));
      expect_rd(12'h0B0 + q, 32'(200 + q));
    end
    expect_rd(12'h080, 32'd11);
    expect_rd(12'h081, 32'd2222);
    expect_rd(12'h082, 32'h33);
    expect_rd(12'h083, 32'h5);
    expect_rd(12'h3FF, 32'h0);
    // Command pulses.
    wr(12'h003, 32'h1);
    wr(12'h003, 32'h2);
    wr(12'h003, 32'h3);
    repeat (3) @(negedge clk);
    check(pulses_clear == 2 && pulses_init == 2, $sformatf("pulses %0d %0d", pulses_clear, pulses_init));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
