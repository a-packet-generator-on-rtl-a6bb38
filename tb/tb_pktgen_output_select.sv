// tb_pktgen_output_select: every queue offers an endless run of 4-word
// packets tagged with its queue number. Output ports must carry their own
// queue, except MAC port i (output 2i), which must carry PCAP queue 8+i while
// use_pcap[i] is set. use_pcap is toggled at random moments, also in the
// middle of packets: every packet on every output must still arrive whole
// and from one queue, and both sources must be seen on each MAC port.
module tb_pktgen_output_select;
  import pg_pkg::*;
  localparam int NQ = 12, NO = 8, NPC = 4;
  logic clk = 0, rst = 1;
  logic [NPC-1:0] use_pcap, sel_pcap;
  pkt_word_t in_word [NQ];
  logic in_valid [NQ], in_ready [NQ];
  pkt_word_t out_word [NO];
  logic out_valid [NO], out_ready [NO];
  int checks = 0, failures = 0;
  int wc [NQ];
  int cur_src [NO];
  int pos [NO];
  int seen_pcap [NPC], seen_norm [NPC], switches = 0;

  pktgen_output_select #(.NUM_Q(NQ), .NUM_OUT(NO), .NUM_PCAP(NPC)) dut (.*);

  always #5 clk = ~clk;

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

  always_comb
    for (int q = 0; q < NQ; q++) begin
      in_valid[q] = !rst && ($urandom_range(0, 4) != 0);
      in_word[q] = '0;
      in_word[q].kind = (wc[q] == 0) ? W_HDR : W_DATA;
      in_word[q].eop = (wc[q] == 3);
      in_word[q].data = {32'(q), 32'(wc[q])};
    end

  always @(posedge clk) if (!rst) begin
    for (int q = 0; q < NQ; q++)
      if (in_valid[q] && in_ready[q]) wc[q] <= (wc[q] == 3) ? 0 : wc[q] + 1;
    for (int p = 0; p < NO; p++)
      if (out_valid[p] && out_ready[p]) begin
        automatic int src = int'(out_word[p].data[63:32]);
        automatic int w   = int'(out_word[p].data[31:0]);
        check(w == pos[p], $sformatf("port %0d word %0d exp %0d", p, w, pos[p]));
        if (pos[p] == 0) begin
          // A packet may only start from the queue chosen by use_pcap.
          if (p % 2 == 0) begin
            check(src == (use_pcap[p/2] ? 8 + p/2 : p), $sformatf("port %0d src %0d", p, src));
            if (src >= 8) seen_pcap[p/2]++; else seen_norm[p/2]++;
          end else check(src == p, "cpu port source");
          cur_src[p] = src;
        end else check(src == cur_src[p], $sformatf("port %0d packet mixed %0d/%0d", p, src, cur_src[p]));
        pos[p] = (pos[p] == 3) ? 0 : pos[p] + 1;
      end
  end

  initial begin
    use_pcap = '0;
    for (int q = 0; q < NQ; q++) wc[q] = 0;
    for (int p = 0; p < NO; p++) begin pos[p] = 0; out_ready[p] = 1; end
    for (int i = 0; i < NPC; i++) begin seen_pcap[i] = 0; seen_norm[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NO; p++) out_ready[p] = ($urandom_range(0, 3) != 0);
      // Change the selection at random moments, mid-packet included.
      if ($urandom_range(0, 30) == 0) begin
        use_pcap = 4'($urandom());
        switches++;
      end
    end
    for (int i = 0; i < NPC; i++)
      check(seen_pcap[i] > 0 && seen_norm[i] > 0, $sformatf("MAC %0d saw both sources", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
