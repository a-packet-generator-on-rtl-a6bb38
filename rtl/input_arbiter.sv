// input_arbiter: serves the eight receive queues round robin onto the single
// 64-bit packet pipeline of the user data path, as the document describes.
// The grant is held for a whole packet (header to eop word). When idle, the
// search for the next requesting input starts just after the input served
// last, so every queue with a waiting packet is served within NUM_IN packets.
// Interface: NUM_IN valid/ready input streams, one output stream.
// Timing: combinational data path; a new grant is taken in the cycle the
// arbiter is idle, so back-to-back packets from different queues have no gap.
module input_arbiter
  import pg_pkg::*;
#(
  parameter int NUM_IN = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  pkt_word_t in_word  [NUM_IN],
  input  logic      in_valid [NUM_IN],
  output logic      in_ready [NUM_IN],
  output pkt_word_t out_word,
  output logic      out_valid,
  input  logic      out_ready
);
  localparam int IW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic          busy;
  logic [IW-1:0] cur, last, pick, sel;
  logic          found;

  // Round-robin pick: first valid input after 'last'.
  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= NUM_IN; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((32'(last) + k) % NUM_IN);
      if (!found && in_valid[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
  end

  assign sel = busy ? cur : pick;

  always_comb begin
    out_word  = in_word[sel];
    out_valid = (busy || found) ? in_valid[sel] : 1'b0;
    for (int i = 0; i < NUM_IN; i++)
      in_ready[i] = (busy || found) && (IW'(i) == sel) && out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cur  <= '0;
      last <= IW'(NUM_IN - 1);
    end else if (out_valid && out_ready) begin
      if (out_word.eop) begin
        busy <= 1'b0;
        last <= sel;
      end else begin
        busy <= 1'b1;
        cur  <= sel;
      end
    end
  end
endmodule
