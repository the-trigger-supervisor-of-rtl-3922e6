// input_card: one subdetector input card of the trigger supervisor.
//
// A trigger source (L1TS, L2C, NT or miscellaneous) delivers 24 data bits and
// a strobe every 25 ns slot. The card writes them into an 8K-deep, 56-bit wide
// dual-port RAM addressed by the 13 low bits of the event timestamp, storing
// the 17 high timestamp bits and the strobe next to the data. Synchronous
// sources (ASYNC = 0) are written every slot at the card's own timestamp
// counter; the asynchronous L2C source (ASYNC = 1) brings its own timestamp
// and is written only when it strobes, possibly out of time order.
// The second RAM port reads the slot `delay` slots behind the card's counter.
// The entry is passed on only if its stored high timestamp bits equal those of
// the slot being read and its strobe bit is set; otherwise the slot reads as
// empty. Old data thus never needs to be cleared. The extracted data goes to
// the monitor output and, through the widening circuit, to the LUT stage.
//
// Entry layout (this design's choice; the document gives only the 56-bit width
// and the fields): [41] strobe, [40:24] timestamp bits 29..13, [23:0] data;
// bits [55:42] are spare and written as zero.
//
// All cards must read a given slot in the same cycle. A card whose counter is
// preset k slots behind the others (to absorb a source latency of k slots)
// therefore needs a read delay k slots shorter; this pairing of preset and
// delay is this design's reading of the document's programmable delay.
// Registers (local cfg addresses, see ts_pkg): timestamp preset, read delay
// (~100 us = 4000 slots after reset, as in the document), reference-bit mask.
// Timing: a slot read when the counter equals T+delay appears on mon_data two
// cycles later and on out_data four cycles later.
module input_card
  import ts_pkg::*;
#(
  parameter bit          ASYNC       = 1'b0,
  parameter int unsigned AW          = 13,
  parameter int unsigned MEM_W       = 56,
  parameter int unsigned DELAY_RESET = 4000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sob,          // start of burst: load counter preset
  input  cfg_wr_t           cfg,
  input  logic [SRC_W-1:0]  src_data,
  input  logic              src_strobe,
  input  logic [TS_W-1:0]   src_ts,       // used only when ASYNC = 1
  output logic [TS_W-1:0]   local_ts,
  output logic [SRC_W-1:0]  mon_data,     // extracted data, to the monitor
  output logic              mon_valid,
  output logic [SRC_W-1:0]  out_data      // widened data, to the LUT stage
);
  localparam int unsigned HI_W = TS_W - AW;

  logic [TS_W-1:0]  preset_q;
  logic [AW-1:0]    delay_q;
  logic [SRC_W-1:0] ref_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      preset_q <= '0;
      delay_q  <= AW'(DELAY_RESET);
      ref_q    <= '1;
    end else if (cfg.we) begin
      unique case (cfg.addr)
        CARD_PRESET: preset_q <= cfg.data[TS_W-1:0];
        CARD_DELAY:  delay_q  <= cfg.data[AW-1:0];
        CARD_REF:    ref_q    <= cfg.data[SRC_W-1:0];
        default: ;
      endcase
    end
  end

  ts_counter #(.W(TS_W)) u_cnt (
    .clk, .rst_n, .load(sob), .preset(preset_q), .count(local_ts)
  );

  // Write port.
  logic [TS_W-1:0]  wts;
  logic             we;
  logic [MEM_W-1:0] wword, rword;

  always_comb begin
    wts   = ASYNC ? src_ts : local_ts;
    we    = ASYNC ? src_strobe : 1'b1;
    wword = '0;
    wword[SRC_W-1:0]            = src_data;
    wword[SRC_W +: HI_W]        = wts[TS_W-1:AW];
    wword[SRC_W + HI_W]         = src_strobe;
  end

  // Read port, a fixed number of slots behind the counter.
  logic [TS_W-1:0] rts, rts_q;
  assign rts = local_ts - TS_W'(delay_q);

  dp_ram #(.AW(AW), .DW(MEM_W)) u_mem (
    .clk, .we, .waddr(wts[AW-1:0]), .wdata(wword),
    .raddr(rts[AW-1:0]), .rdata(rword)
  );

  logic match;
  assign match = rword[SRC_W + HI_W] && (rword[SRC_W +: HI_W] == rts_q[TS_W-1:AW]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rts_q     <= '0;
      mon_data  <= '0;
      mon_valid <= 1'b0;
    end else begin
      rts_q     <= rts;
      mon_data  <= match ? rword[SRC_W-1:0] : '0;
      mon_valid <= match;
    end
  end

  widening #(.W(SRC_W)) u_widen (
    .clk, .rst_n, .ref_mask(ref_q), .din(mon_data), .dout(out_data)
  );
endmodule
