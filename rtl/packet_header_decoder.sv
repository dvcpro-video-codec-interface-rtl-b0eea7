// packet_header_decoder: takes one received DVB-T packet stream (188-byte
// packets, one byte per rx_valid), finds the packets, decodes their headers and
// writes the 182-byte payload of every valid packet into that stream's packet
// FIFO, tagged with its sector address, packet address and multiplexing mode.
//
// Packet alignment: out of lock, a 0x47 byte is taken as a sync byte. In lock,
// the byte expected at the start of each packet must be 0x47, otherwise lock is
// lost (sync_err) and the partial write is discarded. Dummy packets (validity
// flag, bit 7 of byte 4, set) are not stored. A packet that finds the FIFO full
// is dropped and overflow pulses. pkt_start pulses with every accepted sync byte
// and serves as the recovered packet clock.
//
// Timing: payload bytes are written in the cycle they arrive; the packet is
// committed with its last byte.
//
// wr_data is rx_data passed straight on to the FIFO (only wr_en and the tag
// are generated here), so it is a wire from input to output.
module packet_header_decoder
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  // FIFO write port
  output logic       wr_en,
  output logic [7:0] wr_data,
  output logic       wr_commit,
  output logic       wr_abort,
  output pkt_tag_t   wr_tag,
  input  logic       full,
  // status
  output logic       locked,
  output logic       pkt_start,
  output logic       sync_err,
  output logic       overflow,
  output logic       dummy_seen
);

  logic [7:0] idx;         // index of the next byte in the packet
  logic       skip;        // current packet is not stored
  logic       dummy_flag;
  logic [6:0] addr;
  logic [4:0] sector;
  logic [2:0] mode;
  logic       is_sync, in_payload;

  always_comb begin
    is_sync    = rx_valid && rx_data == SYNC_BYTE;
    in_payload = locked && idx >= 8'(HDR_BYTES);
    wr_en      = rx_valid && in_payload &&
                 (idx == 8'(HDR_BYTES) ? !(dummy_flag || full) : !skip);
    wr_data    = rx_data;
    wr_tag     = '{mode: mode, sector: sector, addr: addr};
    wr_commit  = wr_en && idx == 8'(PKT_BYTES - 1);
    pkt_start  = rx_valid && is_sync && (!locked || idx == 8'd0);
    sync_err   = rx_valid && locked && idx == 8'd0 && !is_sync;
    wr_abort   = sync_err;
    // Decision on storing is made with the first payload byte.
    overflow   = rx_valid && locked && idx == 8'(HDR_BYTES) && !dummy_flag && full;
    dummy_seen = rx_valid && locked && idx == 8'(HDR_BYTES) && dummy_flag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      idx        <= '0;
      skip       <= 1'b1;
      dummy_flag <= 1'b0;
      addr       <= '0;
      sector     <= '0;
      mode       <= '0;
    end else if (rx_valid) begin
      if (pkt_start) begin
        locked <= 1'b1;
        idx    <= 8'd1;
        skip   <= 1'b1;
      end else if (sync_err) begin
        locked <= 1'b0;
        idx    <= '0;
      end else if (locked) begin
        idx <= (idx == 8'(PKT_BYTES - 1)) ? 8'd0 : idx + 8'd1;
        if (idx == 8'd4) {dummy_flag, addr} <= rx_data;
        if (idx == 8'd5) {sector, mode}     <= rx_data;
        if (idx == 8'(HDR_BYTES)) skip <= dummy_flag || full;
      end
    end
  end

endmodule
