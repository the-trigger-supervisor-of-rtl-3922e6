// strobe_ram: trigger validation ("strobe") look-up.
//
// A 1-bit-wide RAM addressed by the trigger word itself. Its contents say, for
// every combination of trigger bits, whether a valid trigger (strobe) is
// generated, so any trigger type can be disabled without touching the decision
// logic. Entries are written at local address = trigger word. The document
// prints 16K x 1 but also says every combination of the 16 bits can be
// selected; this design follows the latter and uses 2^AW = 64K entries.
// Contents start cleared (no strobe).
// Timing: registered read; strobe and tw_out follow tw_in by one cycle.
module strobe_ram
  import ts_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_wr_t       cfg,
  input  logic [AW-1:0] tw_in,
  output logic          strobe,
  output logic [AW-1:0] tw_out
);
  logic mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (cfg.we) mem[cfg.addr[AW-1:0]] <= cfg.data[0];
    strobe <= mem[tw_in];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tw_out <= '0;
    else        tw_out <= tw_in;
  end
endmodule
