// dp_ram: simple dual-port static RAM, one write port and one synchronous read
// port on the same clock.
//
// Models the fast dual-ported SRAMs of the input cards and of the trigger queue
// buffer. Read data appears one clock after the read address (registered
// read). A simultaneous read and write of the same address returns the old
// contents. The array is cleared at time zero so that simulation never reads
// undefined contents; the hardware does not rely on this, since stale entries
// are rejected by their stored timestamp bits or by the queue pointers.
module dp_ram #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 56
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
