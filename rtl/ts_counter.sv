// ts_counter: 30-bit timestamp counter of the 40 MHz time slots.
//
// The counter advances by one every clock. On the start-of-burst pulse it is
// loaded with a programmable preset; different presets on the different
// counters align the timestamps given to one event by sources with different
// latencies, as the document describes. Loading the preset at start of burst
// is this design's choice. Timing: count is registered; after a load cycle
// count == preset, and it increments from the next cycle on.
module ts_counter #(
  parameter int unsigned W = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // start-of-burst pulse
  input  logic [W-1:0] preset,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (load) count <= preset;
    else           count <= count + 1'b1;
  end
endmodule
