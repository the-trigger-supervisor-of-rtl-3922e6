// trigger_ram: third layer of the trigger word formation network.
//
// One of the four loadable RAMs that encode the final 16-bit trigger word.
// It is addressed by 12 bits from a logic FPGA together with CW common
// timing lines (here: bit 0 = inside SPS burst, bit 1 = a spare external
// timing line), so that a trigger can be enabled inside or outside the burst.
// Each entry gives OUT_W (4) bits of the trigger word. Entries are written over
// the configuration bus at local address {ctrl, in}. The 12 address bits come
// from the document's figure; the two timing lines and the 4-bit data width
// (16 bits over 4 RAMs) are this design's reading.
// Timing: registered read, dout follows din by one cycle. Contents start
// cleared (no trigger).
module trigger_ram
  import ts_pkg::*;
#(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned CW = 2,
  parameter int unsigned OUT_W  = 4
) (
  input  logic              clk,
  input  cfg_wr_t           cfg,
  input  logic [CW-1:0] ctrl,
  input  logic [IN_W-1:0]   din,
  output logic [OUT_W-1:0]  dout
);
  localparam int unsigned AW = IN_W + CW;

  logic [OUT_W-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (cfg.we) mem[cfg.addr[AW-1:0]] <= cfg.data[OUT_W-1:0];
    dout <= mem[{ctrl, din}];
  end
endmodule
