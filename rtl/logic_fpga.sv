// logic_fpga: second layer of the trigger word formation network.
//
// Provides basic logic functions on the routed bits and reduces 72 bits to 24.
// Output k is an arbitrary programmable function of the three routed bits
// 3k, 3k+1, 3k+2: an 8-entry truth table indexed by {b[3k+2], b[3k+1], b[3k]}
// (local address k, data[7:0]). The 72-to-24 reduction is the document's; the
// three-input table is this design's choice, as the document does not say
// which functions the FPGAs offer. After reset every table is a 3-input OR.
// Timing: one register stage.
module logic_fpga
  import ts_pkg::*;
#(
  parameter int unsigned N_OUT = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_wr_t            cfg,
  input  logic [3*N_OUT-1:0] din,
  output logic [N_OUT-1:0]   dout
);
  logic [7:0] tab_q [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_OUT; k++) tab_q[k] <= 8'hFE;
    end else if (cfg.we && cfg.addr < 16'(N_OUT)) begin
      tab_q[cfg.addr[$clog2(N_OUT)-1:0]] <= cfg.data[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else begin
      for (int k = 0; k < N_OUT; k++)
        dout[k] <= tab_q[k][din[3*k +: 3]];
    end
  end
endmodule
