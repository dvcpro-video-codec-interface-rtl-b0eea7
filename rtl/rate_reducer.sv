// rate_reducer: the "DVCpro data rate reducer". It keeps only the nibbles that
// the selected data rate option transmits and packs them into bytes.
//
// The default option (mode 0, 32.256 Mbit/s) drops the 8 padding bytes of every
// block and the sector lead-in/tail; modes 1..3 also drop the dummy blocks, the
// audio blocks and the control group plus ID bytes (see dvcpro_pkg::keep_nibble).
// Two consecutive kept nibbles form one byte, the first nibble in the upper half
// (this order is this design's choice). At every sector start after data has
// been seen, sector_end pulses with the number of the sector that just ended, so
// that the packet writer can append the CRC and close the last packet.
//
// Timing: one register stage after dvcpro_counters. A byte appears at most every
// second bus nibble; sector_end never coincides with byte_valid.
module rate_reducer
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] mode,
  input  dv_pos_t    pos,
  input  logic       nib_valid,
  input  logic [3:0] nib_data,
  input  logic       sec_start,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic [3:0] byte_sector,  // sector of byte_data
  output logic [2:0] byte_mode,    // data rate option byte_data was kept under
  output logic       sector_end,
  output logic [3:0] end_sector,
  output logic [2:0] end_mode
);

  logic       hi_have;
  logic [3:0] hi_nib;
  logic       active;    // data of the current sector has been seen
  logic       keep;

  always_comb keep = nib_valid && keep_nibble(mode, pos.group, pos.block, pos.nibble);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_have     <= 1'b0;
      hi_nib      <= '0;
      active      <= 1'b0;
      byte_valid  <= 1'b0;
      byte_data   <= '0;
      byte_sector <= '0;
      byte_mode   <= '0;
      sector_end  <= 1'b0;
      end_sector  <= '0;
      end_mode    <= '0;
    end else begin
      byte_valid <= 1'b0;
      sector_end <= 1'b0;
      if (sec_start) begin
        hi_have    <= 1'b0;
        sector_end <= active;
        end_sector <= byte_sector;
        end_mode   <= byte_mode;
        active     <= 1'b0;
      end else if (keep) begin
        if (!hi_have) begin
          hi_nib  <= nib_data;
          hi_have <= 1'b1;
        end else begin
          hi_have     <= 1'b0;
          byte_valid  <= 1'b1;
          byte_data   <= {hi_nib, nib_data};
          byte_sector <= pos.sector;
          byte_mode   <= mode;
          active      <= 1'b1;
        end
      end
    end
  end

endmodule
