// xoff_or: combination of the readout controllers' XOFF lines.
//
// Each readout controller (ROC) raises its XOFF line when its output buffers
// pass a limit. The trigger supervisor pauses dispatching while any enabled
// line is high: xoff_any is the OR of all lines ANDed with a per-ROC enable
// mask. The lines come from other crates, so they pass a two-stage
// synchronizer first. The OR of all lines follows the document; the enable
// mask and the synchronizer are this design's choices.
// Timing: xoff_any follows xoff by two cycles.
module xoff_or #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] enable,
  input  logic [N-1:0] xoff,
  output logic         xoff_any
);
  logic [N-1:0] sync1_q, sync2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q  <= '0;
      sync2_q  <= '0;
    end else begin
      sync1_q  <= xoff;
      sync2_q  <= sync1_q;
    end
  end

  assign xoff_any = |(sync2_q & enable);
endmodule
