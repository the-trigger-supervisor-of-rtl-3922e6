// tqb: Trigger Queue Buffer, the derandomizer of the output stage.
//
// Valid triggers (trigger word + 30-bit timestamp, 46 bits) arrive at random
// times and are written into a dual-port SRAM at a write pointer. They leave
// at a read pointer, at most one per programmable minimum interval dt, so the
// readout controllers never see two requests closer than dt. Depth N is
// programmable: a trigger arriving while N entries are held is lost (tqb full
// dead time, reported by `lost` and `full`). The pointers are counters, the
// interval is a down counter reloaded at every extraction, as in the
// document; the control the document puts in a RAM-based state machine is
// written here as comparators on the occupancy.
//
// XOFF does not freeze the queue: entries keep being written and extracted
// every dt, so the queue never holds triggers that are too old. An entry
// extracted while xoff is high is discarded (`dropped`, not dispatched);
// when xoff falls, dispatching resumes with what the queue then holds.
// An extraction also waits for tx_ready (the transmission stage idle), which is
// this design's choice so that no dispatched packet is overrun.
//
// Registers: N at local address OUT_DEPTH (1..2^AW, 0 taken as 1, reset 3),
// dt at OUT_DT in 25 ns slots (0 taken as 1, reset 800 = 20 us); the reset
// values are the working point quoted in the document.
// Timing: an entry written in cycle t can be extracted from cycle t+1; the
// extracted entry is presented on out_entry with out_valid (dispatch) or
// dropped one cycle after the extraction decision.
module tqb
  import ts_pkg::*;
#(
  parameter int unsigned AW  = 7,
  parameter int unsigned DTW = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,        // start of burst: empty the queue
  input  cfg_wr_t      cfg,
  input  logic         in_valid,     // strobe: a valid trigger
  input  tqb_entry_t   in_entry,
  input  logic         xoff,
  input  logic         tx_ready,
  output logic         out_valid,    // entry dispatched to the transmission stage
  output tqb_entry_t   out_entry,
  output logic         dropped,      // entry extracted but not dispatched (XOFF)
  output logic         lost,         // valid trigger lost, queue full
  output logic         full,
  output logic [AW:0]  occupancy
);
  logic [AW:0]    depth_q;
  logic [DTW-1:0] dt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth_q <= (AW+1)'(3);
      dt_q    <= DTW'(800);
    end else if (cfg.we) begin
      unique case (cfg.addr)
        OUT_DEPTH: depth_q <= (cfg.data[AW:0] == '0) ? (AW+1)'(1)
                            : (cfg.data > 32'(2**AW)) ? (AW+1)'(2**AW) : cfg.data[AW:0];
        OUT_DT:    dt_q    <= (cfg.data[DTW-1:0] == '0) ? DTW'(1) : cfg.data[DTW-1:0];
        default: ;
      endcase
    end
  end

  logic [AW:0]    wp_q, rp_q;
  logic [DTW-1:0] dt_cnt_q;
  logic           empty, do_write, do_read, xoff_q, rd_q;

  assign occupancy = wp_q - rp_q;
  assign empty     = (occupancy == '0);
  assign full      = (occupancy >= depth_q);
  assign do_write  = in_valid && !full;
  assign do_read   = !empty && (dt_cnt_q == '0) && tx_ready && !rd_q;
  assign lost      = in_valid && full;

  dp_ram #(.AW(AW), .DW(TQB_W)) u_sram (
    .clk, .we(do_write), .waddr(wp_q[AW-1:0]), .wdata(in_entry),
    .raddr(rp_q[AW-1:0]), .rdata(out_entry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q     <= '0;
      rp_q     <= '0;
      dt_cnt_q <= '0;
      rd_q     <= 1'b0;
      xoff_q   <= 1'b0;
    end else if (clear) begin
      wp_q     <= '0;
      rp_q     <= '0;
      dt_cnt_q <= '0;
      rd_q     <= 1'b0;
      xoff_q   <= 1'b0;
    end else begin
      if (do_write) wp_q <= wp_q + 1'b1;
      if (do_read) begin
        rp_q     <= rp_q + 1'b1;
        dt_cnt_q <= dt_q - 1'b1;
      end else if (dt_cnt_q != '0) begin
        dt_cnt_q <= dt_cnt_q - 1'b1;
      end
      rd_q   <= do_read;
      xoff_q <= xoff;
    end
  end

  assign out_valid = rd_q && !xoff_q;
  assign dropped   = rd_q && xoff_q;
endmodule
