// downscaler: per-bit programmable downscaling of the trigger word.
//
// Each of the N trigger bits has its own factor F (16 bits, up to 65 535) and
// event counter. Of the slots in which bit i is set, only every F-th is
// passed on: the 1st, F+1-th, 2F+1-th, ... after the start of the burst.
// F = 0 and F = 1 both pass every occurrence. Factors are written at local
// address i; the counters restart on `clear` (start of burst). The document
// gives the per-bit factor up to 65 535; which occurrence of each group is kept
// and the meaning of F = 0 are this design's choices.
// Timing: one register stage, dout follows din by one cycle.
module downscaler
  import ts_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned DW = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  cfg_wr_t      cfg,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  logic [DW-1:0] factor_q [N];
  logic [DW-1:0] cnt_q    [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) factor_q[i] <= DW'(1);
    end else if (cfg.we && cfg.addr < 16'(N)) begin
      factor_q[cfg.addr[$clog2(N)-1:0]] <= cfg.data[DW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
      dout <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
      dout <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        dout[i] <= din[i] && (cnt_q[i] == '0);
        if (din[i]) cnt_q[i] <= (factor_q[i] <= DW'(1) || cnt_q[i] == factor_q[i] - 1'b1)
                                ? '0 : cnt_q[i] + 1'b1;
      end
    end
  end
endmodule
