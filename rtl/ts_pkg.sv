// ts_pkg: widths, packet layout and configuration address map shared by the
// trigger supervisor blocks.
//
// The trigger supervisor runs on one 40 MHz clock (25 ns time slots). Every
// trigger source delivers up to 24 bits per slot; four sources give 96 bits.
// Events are identified by a 30-bit timestamp counting 25 ns slots within the
// burst. The final trigger word is 16 bits, and the packet sent to the readout
// controllers is 64 bits: event number, trigger word, 2 spare bits, timestamp.
// These numbers follow the document. The configuration address map below is
// this design's own: it stands in for the VME bus through which all FPGAs,
// RAMs and counters of the original were loaded and read.
package ts_pkg;

  localparam int unsigned SRC_W    = 24;  // bits per trigger source
  localparam int unsigned N_SRC    = 4;   // L1TS, L2C, NT, MISC
  localparam int unsigned TS_W     = 30;  // timestamp width
  localparam int unsigned TW_W     = 16;  // trigger word width
  localparam int unsigned EVN_W    = 16;  // event number width
  localparam int unsigned CNT_W    = 24;  // trigger bit counters
  localparam int unsigned LUT_IN   = N_SRC * SRC_W;  // 96
  localparam int unsigned ROUTE_W  = 72;  // outputs of one routing FPGA
  localparam int unsigned LOGIC_W  = 24;  // outputs of one logic FPGA
  localparam int unsigned RAM_IN   = 12;  // logic bits into one trigger RAM
  localparam int unsigned CTRL_W   = 2;   // common timing lines into the RAMs
  localparam int unsigned TQB_W    = TW_W + TS_W;  // 46-bit queue entry

  // Source index on the input stage.
  typedef enum logic [1:0] {SRC_L1TS = 2'd0, SRC_L2C = 2'd1, SRC_NT = 2'd2, SRC_MISC = 2'd3} src_e;

  // One queued trigger: trigger word and the timestamp of its time slot.
  typedef struct packed {
    logic [TW_W-1:0] tw;
    logic [TS_W-1:0] ts;
  } tqb_entry_t;

  // 64-bit trigger packet, most significant field first on the link.
  typedef struct packed {
    logic [EVN_W-1:0] evnum;
    logic [TW_W-1:0]  tw;
    logic [1:0]       spare;
    logic [TS_W-1:0]  ts;
  } packet_t;

  // Configuration write as seen by one block: local address and data.
  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [31:0] data;
  } cfg_wr_t;

  // Top-level configuration address map (24-bit word addresses). The upper
  // byte selects a region; the lower 16 bits are the block's local address.
  localparam logic [7:0] REG_ROUTE0  = 8'h00;  // routing FPGA 0: select k
  localparam logic [7:0] REG_ROUTE1  = 8'h01;  // routing FPGA 1: select k
  localparam logic [7:0] REG_LOGIC0  = 8'h02;  // logic FPGA 0: table k
  localparam logic [7:0] REG_LOGIC1  = 8'h03;  // logic FPGA 1: table k
  localparam logic [7:0] REG_TRAM0   = 8'h04;  // trigger RAMs 0..3: 8'h04..8'h07
  localparam logic [7:0] REG_STROBE  = 8'h08;  // strobe RAM entry = trigger word
  localparam logic [7:0] REG_DSCALE  = 8'h09;  // downscale factor of bit k
  localparam logic [7:0] REG_CARD0   = 8'h0A;  // input cards 0..3: 8'h0A..8'h0D
  localparam logic [7:0] REG_OUT     = 8'h0E;  // output stage registers
  localparam logic [7:0] REG_CNT     = 8'h10;  // read: trigger counter k
  localparam logic [7:0] REG_DEAD    = 8'h11;  // read: dead-time counters 0..3, event number 4

  // Input card local registers.
  localparam logic [15:0] CARD_PRESET = 16'd0;  // timestamp counter preset
  localparam logic [15:0] CARD_DELAY  = 16'd1;  // read-out delay in time slots
  localparam logic [15:0] CARD_REF    = 16'd2;  // time-reference bit mask (not widened)

  // Output stage local registers.
  localparam logic [15:0] OUT_DEPTH   = 16'd0;  // TQB depth N
  localparam logic [15:0] OUT_DT      = 16'd1;  // minimum interval dt in time slots
  localparam logic [15:0] OUT_XMASK   = 16'd2;  // XOFF enable per ROC
  localparam logic [15:0] OUT_PRESET  = 16'd3;  // output timestamp counter preset

endpackage
