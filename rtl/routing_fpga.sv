// routing_fpga: first layer of the trigger word formation network.
//
// Any subset of the 96 input bits from the four input cards can be used by
// the decision logic. This layer picks N_OUT (72) of them: output k is a copy
// of the input bit whose index is held in select register k. The selects are
// loaded over the configuration bus (local address k, data = input index).
// The document gives the 96-in, 72-out sizes; a per-output multiplexer is this
// design's reading of "routing". After reset output k selects input k.
// Timing: one register stage, dout follows din by one cycle.
module routing_fpga
  import ts_pkg::*;
#(
  parameter int unsigned N_IN  = 96,
  parameter int unsigned N_OUT = 72
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [N_IN-1:0]  din,
  output logic [N_OUT-1:0] dout
);
  localparam int unsigned SW = $clog2(N_IN);

  logic [SW-1:0] sel_q [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_OUT; k++) sel_q[k] <= SW'(k % N_IN);
    end else if (cfg.we && cfg.addr < 16'(N_OUT)) begin
      sel_q[cfg.addr[$clog2(N_OUT)-1:0]] <= cfg.data[SW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else begin
      for (int k = 0; k < N_OUT; k++)
        dout[k] <= (32'(sel_q[k]) < N_IN) ? din[sel_q[k]] : 1'b0;
    end
  end
endmodule
