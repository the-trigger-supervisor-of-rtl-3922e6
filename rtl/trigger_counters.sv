// trigger_counters: burst counters of the trigger bits.
//
// One CW-bit (24-bit) counter per trigger bit counts the slots in which that
// bit of the downscaled trigger word is set, along the whole burst. The
// counters restart on `clear` (start of burst) and keep their values through
// the interburst, when they are read: rd_data is counter rd_idx, combinational.
// Counters saturate at their maximum (this design's choice; the document only
// gives the 24-bit width).
module trigger_counters #(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [N-1:0]         din,
  input  logic [$clog2(N)-1:0] rd_idx,
  output logic [CW-1:0]        rd_data
);
  logic [CW-1:0] cnt_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (din[i] && cnt_q[i] != '1) cnt_q[i] <= cnt_q[i] + 1'b1;
    end
  end

  assign rd_data = cnt_q[rd_idx];
endmodule
