// burst_fsm: burst / interburst controller.
//
// The SPS delivers protons in a ~2.5 s burst every 14.4 s. During the burst the
// trigger supervisor runs under hardware control; in the interburst the
// control CPU reads the counters and loads the configuration. This state
// machine has two states, INTERBURST and BURST. A start-of-burst pulse (sob) in
// INTERBURST moves it to BURST and produces a one-cycle `start` pulse that
// clears all burst counters, the queue and the event number, and loads the
// timestamp counter presets. An end-of-burst pulse (eob) in BURST returns it
// to INTERBURST. in_burst is a timing line for the trigger RAMs; cfg_en allows
// configuration writes only in the interburst. The two-state split follows the
// document's description of burst and interburst control; the signals are
// this design's choice.
// Timing: start and in_burst rise one cycle after sob.
module burst_fsm (
  input  logic clk,
  input  logic rst_n,
  input  logic sob,
  input  logic eob,
  output logic start,
  output logic in_burst,
  output logic cfg_en
);
  typedef enum logic {INTERBURST = 1'b0, BURST = 1'b1} state_e;
  state_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= INTERBURST;
      start   <= 1'b0;
    end else begin
      start <= 1'b0;
      unique case (state_q)
        INTERBURST: if (sob) begin
          state_q <= BURST;
          start   <= 1'b1;
        end
        BURST: if (eob) state_q <= INTERBURST;
        default: state_q <= INTERBURST;
      endcase
    end
  end

  assign in_burst = (state_q == BURST);
  assign cfg_en   = (state_q == INTERBURST);
endmodule
