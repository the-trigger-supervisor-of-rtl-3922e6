// widening: time-slot widening of coincidence signals.
//
// Two trigger systems may put the same event into neighbouring 25 ns slots.
// For a coincidence, the bits used as the time reference are left as they
// are, and every other bit is widened to three slots: the output for slot t
// is the OR of the input in slots t-1, t and t+1. Which bits are references
// is a programmable mask (ref_mask bit = 1: pass unchanged).
//
// Timing: the output for the slot presented at din in cycle t appears on dout
// in cycle t+2 (one cycle to see the following slot, one output register).
// The three-slot OR follows the document; the register placement is this
// design's choice.
module widening #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ref_mask,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] cur_q, prev_q;   // slot t and slot t-1 while din holds slot t+1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      prev_q <= '0;
      dout   <= '0;
    end else begin
      cur_q  <= din;
      prev_q <= cur_q;
      dout   <= (ref_mask & cur_q) | (~ref_mask & (prev_q | cur_q | din));
    end
  end
endmodule
