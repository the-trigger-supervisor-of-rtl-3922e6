// lut_tree: trigger word formation ("LUT tree").
//
// The 96 bits from the four input cards go to two routing FPGAs (96 -> 72
// each), then to two logic FPGAs (72 -> 24 each), then to four RAMs that each
// take 12 of those bits plus the common timing lines and produce 4 bits of
// the 16-bit trigger word. RAM j takes logic bits [12j+11:12j] (j = 0,1 from
// logic FPGA 0, j = 2,3 from logic FPGA 1) and gives trigger bits [4j+3:4j].
// This arrangement is the one drawn in the document; the bit ordering is this
// design's choice. Every layer is loadable (cfg_* ports, local addresses).
// Timing: three register stages, tw follows din by three cycles.
module lut_tree
  import ts_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg_route [2],
  input  cfg_wr_t           cfg_logic [2],
  input  cfg_wr_t           cfg_tram  [4],
  input  logic [CTRL_W-1:0] ctrl,
  input  logic [LUT_IN-1:0] din,
  output logic [TW_W-1:0]   tw
);
  logic [ROUTE_W-1:0] routed [2];
  logic [LOGIC_W-1:0] logic_out [2];

  for (genvar g = 0; g < 2; g++) begin : g_half
    routing_fpga #(.N_IN(LUT_IN), .N_OUT(ROUTE_W)) u_route (
      .clk, .rst_n, .cfg(cfg_route[g]), .din, .dout(routed[g])
    );
    logic_fpga #(.N_OUT(LOGIC_W)) u_logic (
      .clk, .rst_n, .cfg(cfg_logic[g]), .din(routed[g]), .dout(logic_out[g])
    );
    for (genvar r = 0; r < 2; r++) begin : g_ram
      trigger_ram #(.IN_W(RAM_IN), .CW(CTRL_W), .OUT_W(TW_W/4)) u_ram (
        .clk, .cfg(cfg_tram[2*g + r]), .ctrl,
        .din(logic_out[g][RAM_IN*r +: RAM_IN]),
        .dout(tw[(TW_W/4)*(2*g + r) +: TW_W/4])
      );
    end
  end
endmodule
