// packet_reader: the coder's FIFO "read control" together with the "packet
// header generator". On every packet clock tick it sends one 188-byte DVB-T
// packet, one byte per cycle:
//   byte 0     sync word 0x47
//   bytes 1-3  reserved, sent as 0x00
//   byte 4     validity flag (bit 7, 1 = dummy packet) and packet address (6:0)
//   byte 5     sector address (7:3) and multiplexing mode (2:0)
//   bytes 6+   182 DVCpro bytes
// If no complete packet waits in the FIFO, a dummy packet (flag set, zero
// payload) is sent instead. Consecutive packets go to channel 0 and channel 1
// alternately. The bit positions inside bytes 4 and 5 and the reserved value are
// this design's choice; the field widths are the document's.
//
// Timing: a packet starts the cycle after a tick and lasts 188 cycles; the FIFO
// slot is released with the last byte. Ticks during a packet are ignored, so the
// tick period must exceed 188 cycles.
module packet_reader
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic [2:0] mode,
  // FIFO read port
  input  logic       rd_avail,
  input  pkt_tag_t   rd_tag,
  output logic [7:0] rd_off,
  input  logic [7:0] rd_data,
  output logic       rd_release,
  // packet stream
  output logic       tx_valid,
  output logic       tx_sop,
  output logic [7:0] tx_data,
  output logic       tx_chan,
  output logic       dummy      // pulses when a dummy packet starts
);

  logic       busy, is_dummy, chan;
  logic [7:0] idx;
  pkt_tag_t   tag;
  logic [7:0] hdr_byte;

  always_comb begin
    rd_off = idx - 8'(HDR_BYTES);
    case (idx)
      8'd0:    hdr_byte = SYNC_BYTE;
      8'd4:    hdr_byte = {is_dummy, is_dummy ? 7'd0 : tag.addr};
      8'd5:    hdr_byte = is_dummy ? {5'd0, mode} : {tag.sector, tag.mode};
      default: hdr_byte = 8'h00;
    endcase
    tx_valid   = busy;
    tx_sop     = busy && idx == 8'd0;
    tx_chan    = chan;
    tx_data    = (idx < 8'(HDR_BYTES)) ? hdr_byte : (is_dummy ? 8'h00 : rd_data);
    rd_release = busy && !is_dummy && idx == 8'(PKT_BYTES - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      is_dummy <= 1'b0;
      chan     <= 1'b1;
      idx      <= '0;
      tag      <= '0;
      dummy    <= 1'b0;
    end else begin
      dummy <= 1'b0;
      if (busy) begin
        if (idx == 8'(PKT_BYTES - 1)) busy <= 1'b0;
        idx <= idx + 8'd1;
      end else if (tick) begin
        busy     <= 1'b1;
        idx      <= '0;
        chan     <= ~chan;
        is_dummy <= !rd_avail;
        tag      <= rd_tag;
        dummy    <= !rd_avail;
      end
    end
  end

endmodule
