// packet_writer: the "DVB-T packet generator" and FIFO "write control" of the
// coder. It cuts the reduced DVCpro byte stream into 182-byte packet payloads.
//
// Bytes are written into the current FIFO slot as they arrive; after the 182nd
// the packet is committed and the next byte opens a new packet with the next
// packet address. When a sector ends, the two CRC bytes of that sector (high
// byte first) are appended, and the partly filled packet is committed at once;
// the FIFO pads it with zeros on read. The packet address restarts at 0 in every
// sector, so the 32.256 Mbit/s option gives 74 packets per sector. If the FIFO
// has no free slot when a packet would start, that packet's bytes are dropped and
// overflow pulses. The tag (sector, packet address, mode) is kept with the
// payload; the header bytes are produced when the packet is read out.
//
// Timing: one write per cycle; sector_end is followed by two CRC cycles, which
// do not collide with data because a sector's first data byte comes later.
module packet_writer
  import dvcpro_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  input  logic [3:0]  byte_sector,
  input  logic [2:0]  byte_mode,
  input  logic        sector_end,
  input  logic [3:0]  end_sector,
  input  logic [2:0]  end_mode,
  input  logic [15:0] crc,          // CRC of the sector, valid with sector_end
  // FIFO write port
  output logic        wr_en,
  output logic [7:0]  wr_data,
  output logic        wr_commit,
  output pkt_tag_t    wr_tag,
  input  logic        full,
  output logic        overflow
);

  logic [7:0] off;       // bytes in the current packet
  logic [6:0] addr;      // packet address within the sector
  logic [4:0] sector;
  logic [2:0] mode;
  logic       drop;      // current packet is being dropped
  logic [1:0] crc_left;  // CRC bytes still to append
  logic [15:0] crc_q;     // CRC of the sector being closed
  logic       in_valid;
  logic [7:0] in_data;
  logic       opening;

  always_comb begin
    in_valid = byte_valid || crc_left != 2'd0;
    in_data  = byte_valid ? byte_data : (crc_left == 2'd2 ? crc_q[15:8] : crc_q[7:0]);
    opening  = in_valid && off == 8'd0;
    wr_en    = in_valid && !(opening ? full : drop);
    wr_data  = in_data;
    wr_tag   = '{mode: mode, sector: sector, addr: addr};
    // Commit when the payload is full, or after the last CRC byte.
    wr_commit = !(opening ? full : drop) &&
                ((in_valid && off == 8'(PAYLOAD_BYTES - 1)) ||
                 (crc_left == 2'd1 && !byte_valid));
    overflow = opening && full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off      <= '0;
      addr     <= '0;
      sector   <= '0;
      mode     <= '0;
      drop     <= 1'b0;
      crc_left <= '0;
      crc_q    <= '0;
    end else begin
      if (sector_end) begin
        crc_left <= 2'd2;
        crc_q    <= crc;
        sector   <= {1'b0, end_sector};
        mode     <= end_mode;
      end else if (crc_left != 2'd0 && !byte_valid) begin
        crc_left <= crc_left - 2'd1;
      end
      if (in_valid) begin
        if (opening) begin
          drop <= full;
          if (byte_valid) begin
            sector <= {1'b0, byte_sector};
            mode   <= byte_mode;
          end
        end
        if (off == 8'(PAYLOAD_BYTES - 1)) begin
          off  <= '0;
          addr <= addr + 7'd1;
        end else begin
          off <= off + 8'd1;
        end
      end
      // After the last CRC byte the sector is closed: next packet is address 0.
      if (crc_left == 2'd1 && !byte_valid) begin
        off  <= '0;
        addr <= '0;
      end
    end
  end

endmodule
