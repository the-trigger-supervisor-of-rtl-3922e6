// transmitter: transmission stage of the trigger supervisor.
//
// For every dispatched trigger it attaches the next sequential event number
// (16 bits, restarting at 0 at start of burst) and forms the 64-bit trigger
// packet {event number, trigger word, 2 spare bits = 0, 30-bit timestamp}.
// The packet is sent as eight 8-bit frames, most significant byte first, to
// the serial link transmitters of all readout controllers at once. A frame is
// presented on tx_byte for FRAME_CYCLES clocks, with tx_strobe high in its
// first clock. The default of 5 clocks (125 ns) matches a link moving 8-bit
// frames, 4b/5b encoded, at 80 Mbit/s: 8 frames take 1 us, close to the
// ~900 ns packet overhead the document quotes. The packet layout and event
// numbering follow the document; the byte order and frame timing are this
// design's choices. ready is low while a packet is being sent; a packet
// offered while not ready is ignored (the queue waits for ready).
module transmitter
  import ts_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // start of burst: event number to 0
  input  logic             in_valid,
  input  tqb_entry_t       in_entry,
  output logic             ready,
  output logic [7:0]       tx_byte,
  output logic             tx_strobe,
  output logic [EVN_W-1:0] evnum      // number the next packet will carry
);
  localparam int unsigned FCW = $clog2(FRAME_CYCLES + 1);

  packet_t        pkt_q;
  logic [2:0]     byte_q;
  logic [FCW-1:0] fcnt_q;
  logic           busy_q;

  assign ready   = !busy_q;
  assign tx_byte = busy_q ? pkt_q[63 - 8*byte_q -: 8] : 8'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_q     <= '0;
      byte_q    <= '0;
      fcnt_q    <= '0;
      busy_q    <= 1'b0;
      tx_strobe <= 1'b0;
      evnum     <= '0;
    end else begin
      tx_strobe <= 1'b0;
      if (clear) evnum <= '0;
      if (!busy_q) begin
        if (in_valid) begin
          pkt_q     <= '{evnum: clear ? '0 : evnum, tw: in_entry.tw, spare: 2'b00, ts: in_entry.ts};
          evnum     <= (clear ? '0 : evnum) + 1'b1;
          busy_q    <= 1'b1;
          byte_q    <= '0;
          fcnt_q    <= '0;
          tx_strobe <= 1'b1;
        end
      end else if (fcnt_q == FCW'(FRAME_CYCLES - 1)) begin
        fcnt_q <= '0;
        if (byte_q == 3'd7) begin
          busy_q <= 1'b0;
        end else begin
          byte_q    <= byte_q + 1'b1;
          tx_strobe <= 1'b1;
        end
      end else begin
        fcnt_q <= fcnt_q + 1'b1;
      end
    end
  end
endmodule
