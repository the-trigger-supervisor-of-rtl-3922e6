// trigger_supervisor: top level of the trigger supervisor.
//
// A 40 MHz, fully pipelined trigger processor. Four input cards (L1TS, L2C,
// NT, miscellaneous) store the source bits by timestamp and read them back in
// time order a programmable ~100 us later, discarding stale entries. The
// widened 96 bits go through the routing / logic / RAM network (lut_tree) to a
// 16-bit trigger word, whose bits are downscaled and counted. A RAM addressed
// by the word decides whether it is a valid trigger (strobe). Valid triggers
// with the output timestamp enter the trigger queue buffer, which releases at
// most one per minimum interval dt. Unless a readout controller holds XOFF,
// the released trigger gets an event number and its 64-bit packet is sent as
// 8-bit frames to all N_ROC links. Dead time from XOFF and from a full queue
// is counted. A two-state burst FSM clears everything at start of burst and
// allows configuration only in the interburst.
//
// Configuration / readout bus (stands in for the VME bus): cfg_addr[23:16]
// selects a region, cfg_addr[15:0] the block's local address (map in ts_pkg).
// Writes take effect in the interburst only. cfg_rdata returns, combinational,
// trigger counter k (region REG_CNT), dead-time counter k (REG_DEAD, k = 0..3),
// the next event number (REG_DEAD, k = 4) or the queue occupancy (k = 5).
//
// Pipeline: a slot read by the input cards when their counter is T + delay
// reaches the queue PIPE_LAT = 9 cycles later (2 RAM read/match, 2 widening,
// 3 lut_tree, 1 downscaler, 1 strobe RAM). The queue entry takes the output
// timestamp counter; programming its preset to card preset - delay - 9 makes
// that equal to the event's own timestamp T.
module trigger_supervisor
  import ts_pkg::*;
#(
  parameter int unsigned N_ROC       = 10,
  parameter int unsigned TQB_AW      = 7,
  parameter int unsigned DELAY_RESET = 4000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sob,
  input  logic                   eob,
  input  logic                   ext_timing,          // spare timing line to the trigger RAMs
  input  logic [N_SRC-1:0][SRC_W-1:0] src_data,
  input  logic [N_SRC-1:0]       src_strobe,
  input  logic [TS_W-1:0]        l2c_ts,
  input  logic [N_ROC-1:0]       xoff,
  output logic [N_ROC-1:0][7:0]  tx_byte,
  output logic [N_ROC-1:0]       tx_strobe,
  output logic [N_SRC-1:0][SRC_W-1:0] mon_data,       // to the monitor acquisition units
  output logic [N_SRC-1:0]       mon_valid,
  output logic                   in_burst,
  input  logic                   cfg_we,
  input  logic [23:0]            cfg_addr,
  input  logic [31:0]            cfg_wdata,
  output logic [31:0]            cfg_rdata
);
  localparam int unsigned PIPE_LAT = 9;

  // Burst control and configuration decode.
  logic start, cfg_en;
  burst_fsm u_fsm (.clk, .rst_n, .sob, .eob, .start, .in_burst, .cfg_en);

  function automatic cfg_wr_t region(input logic [7:0] r, input logic en, input logic we,
                                     input logic [23:0] a, input logic [31:0] d);
    region.we   = en && we && (a[23:16] == r);
    region.addr = a[15:0];
    region.data = d;
  endfunction

  cfg_wr_t cfg_route [2], cfg_logic [2], cfg_tram [4], cfg_card [N_SRC];
  cfg_wr_t cfg_strobe, cfg_dscale, cfg_out;

  always_comb begin
    for (int g = 0; g < 2; g++) begin
      cfg_route[g] = region(REG_ROUTE0 + 8'(g), cfg_en, cfg_we, cfg_addr, cfg_wdata);
      cfg_logic[g] = region(REG_LOGIC0 + 8'(g), cfg_en, cfg_we, cfg_addr, cfg_wdata);
    end
    for (int r = 0; r < 4; r++)
      cfg_tram[r] = region(REG_TRAM0 + 8'(r), cfg_en, cfg_we, cfg_addr, cfg_wdata);
    for (int c = 0; c < N_SRC; c++)
      cfg_card[c] = region(REG_CARD0 + 8'(c), cfg_en, cfg_we, cfg_addr, cfg_wdata);
    cfg_strobe = region(REG_STROBE, cfg_en, cfg_we, cfg_addr, cfg_wdata);
    cfg_dscale = region(REG_DSCALE, cfg_en, cfg_we, cfg_addr, cfg_wdata);
    cfg_out    = region(REG_OUT,    cfg_en, cfg_we, cfg_addr, cfg_wdata);
  end

  // Output stage registers: XOFF enables and output timestamp preset.
  logic [N_ROC-1:0] xmask_q;
  logic [TS_W-1:0]  opreset_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xmask_q   <= '1;
      opreset_q <= TS_W'(-(DELAY_RESET + PIPE_LAT));
    end else if (cfg_out.we) begin
      if (cfg_out.addr == OUT_XMASK)  xmask_q   <= cfg_out.data[N_ROC-1:0];
      if (cfg_out.addr == OUT_PRESET) opreset_q <= cfg_out.data[TS_W-1:0];
    end
  end

  // Input stage.
  logic [LUT_IN-1:0] lut_in;
  for (genvar c = 0; c < N_SRC; c++) begin : g_card
    input_card #(.ASYNC(c == int'(SRC_L2C)), .DELAY_RESET(DELAY_RESET)) u_card (
      .clk, .rst_n, .sob(start), .cfg(cfg_card[c]),
      .src_data(src_data[c]), .src_strobe(src_strobe[c]), .src_ts(l2c_ts),
      .local_ts(), .mon_data(mon_data[c]), .mon_valid(mon_valid[c]),
      .out_data(lut_in[SRC_W*c +: SRC_W])
    );
  end

  // Trigger word formation, downscaling, counting, strobe.
  logic [TW_W-1:0] tw_raw, tw_ds, tw_q;
  logic            strobe;

  lut_tree u_lut (
    .clk, .rst_n, .cfg_route, .cfg_logic, .cfg_tram,
    .ctrl({ext_timing, in_burst}), .din(lut_in), .tw(tw_raw)
  );

  downscaler #(.N(TW_W), .DW(16)) u_ds (
    .clk, .rst_n, .clear(start), .cfg(cfg_dscale), .din(tw_raw), .dout(tw_ds)
  );

  logic [CNT_W-1:0] trig_cnt;
  trigger_counters #(.N(TW_W), .CW(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(start), .din(tw_ds),
    .rd_idx(cfg_addr[$clog2(TW_W)-1:0]), .rd_data(trig_cnt)
  );

  strobe_ram #(.AW(TW_W)) u_strobe (
    .clk, .rst_n, .cfg(cfg_strobe), .tw_in(tw_ds), .strobe, .tw_out(tw_q)
  );

  // Output stage.
  logic [TS_W-1:0] out_ts;
  ts_counter #(.W(TS_W)) u_out_ts (
    .clk, .rst_n, .load(start), .preset(opreset_q), .count(out_ts)
  );

  logic xoff_any;
  xoff_or #(.N(N_ROC)) u_xoff (.clk, .rst_n, .enable(xmask_q), .xoff, .xoff_any);

  tqb_entry_t    q_entry;
  logic          q_valid, q_drop, q_lost, q_full, tx_ready;
  logic [TQB_AW:0] q_occ;

  tqb #(.AW(TQB_AW)) u_tqb (
    .clk, .rst_n, .clear(start), .cfg(cfg_out),
    .in_valid(strobe), .in_entry('{tw: tw_q, ts: out_ts}),
    .xoff(xoff_any), .tx_ready,
    .out_valid(q_valid), .out_entry(q_entry), .dropped(q_drop),
    .lost(q_lost), .full(q_full), .occupancy(q_occ)
  );

  logic [CNT_W-1:0] dead_cnt;
  deadtime_monitor #(.CW(CNT_W)) u_dead (
    .clk, .rst_n, .clear(start), .xoff(xoff_any), .xoff_drop(q_drop),
    .full(q_full), .full_lost(q_lost), .rd_idx(cfg_addr[1:0]), .rd_data(dead_cnt)
  );

  logic [7:0]       link_byte;
  logic             link_strobe;
  logic [EVN_W-1:0] evnum;
  transmitter u_tx (
    .clk, .rst_n, .clear(start), .in_valid(q_valid), .in_entry(q_entry),
    .ready(tx_ready), .tx_byte(link_byte), .tx_strobe(link_strobe), .evnum
  );

  // The same frames go to every readout controller link.
  always_comb begin
    for (int i = 0; i < N_ROC; i++) begin
      tx_byte[i]   = link_byte;
      tx_strobe[i] = link_strobe;
    end
  end

  // Readout.
  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr[23:16] == REG_CNT) cfg_rdata = 32'(trig_cnt);
    else if (cfg_addr[23:16] == REG_DEAD) begin
      unique case (cfg_addr[2:0])
        3'd0, 3'd1, 3'd2, 3'd3: cfg_rdata = 32'(dead_cnt);
        3'd4:    cfg_rdata = 32'(evnum);
        3'd5:    cfg_rdata = 32'(q_occ);
        default: cfg_rdata = '0;
      endcase
    end
  end
endmodule
