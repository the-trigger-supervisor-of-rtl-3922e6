// deadtime_monitor: dead-time counters of the trigger supervisor.
//
// Four CW-bit counters, cleared at start of burst and read in the interburst:
//   0: time slots with XOFF active
//   1: valid triggers not dispatched because of XOFF
//   2: time slots with the trigger queue full
//   3: valid triggers lost because the queue was full
// The four quantities are the document's; the width (24 bits, like the
// trigger counters) and saturation are this design's choices.
// rd_data shows counter rd_idx, combinational.
module deadtime_monitor #(
  parameter int unsigned CW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          xoff,
  input  logic          xoff_drop,
  input  logic          full,
  input  logic          full_lost,
  input  logic [1:0]    rd_idx,
  output logic [CW-1:0] rd_data
);
  logic [CW-1:0] cnt_q [4];
  logic [3:0]    ev;

  assign ev = {full_lost, full, xoff_drop, xoff};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) cnt_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < 4; i++) cnt_q[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (ev[i] && cnt_q[i] != '1) cnt_q[i] <= cnt_q[i] + 1'b1;
    end
  end

  assign rd_data = cnt_q[rd_idx];
endmodule
