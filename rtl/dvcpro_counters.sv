// dvcpro_counters: tracks the sector, group, block and nibble of every nibble
// on the 4-bit DVCpro codec bus.
//
// The codec marks the start of each sector with SSP (Sector Start Pulse), the
// start of each 80+8-byte block with SMP (Start Mark Pulse), and the start of a
// frame with FRP18 (asserted together with the SSP of sector 0). A nibble is
// present on BUS in every cycle with bus_en high; smp/ssp/frp18 are sampled only
// in those cycles. The cycle carrying SMP holds nibble 0 of the block. The nibble
// index counts up to 175 (the last padding nibble) and then rests at 176 until
// the next SMP, so the lead-in and tail padding of a sector fall outside any
// block. The counters are used in both directions: in decoder mode the bus data
// input is simply unused.
//
// Timing: outputs are registered; pos/nib_valid/nib_data describe the nibble
// sampled one cycle earlier. sec_start is high with the (non-data) SSP nibble.
// That the strobes coincide with a bus nibble, and that FRP18 coincides with the
// SSP of sector 0, are this design's reading of the codec interface.
module dvcpro_counters
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_en,     // a nibble is on the bus this cycle
  input  logic [3:0] bus,        // nibble (coder mode)
  input  logic       smp,        // start of block
  input  logic       ssp,        // start of sector
  input  logic       frp18,      // start of frame (with SSP of sector 0)
  output dv_pos_t    pos,        // position of the registered nibble
  output logic       nib_valid,  // registered bus_en
  output logic [3:0] nib_data,   // registered nibble
  output logic       sec_start,  // registered SSP
  output logic       frame_start // registered FRP18
);

  logic first_blk;  // next SMP is group 0, block 0

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos         <= '{sector: 4'd0, group: 5'd0, block: 3'd0, nibble: NIB_IDLE};
      first_blk   <= 1'b1;
      nib_valid   <= 1'b0;
      nib_data    <= '0;
      sec_start   <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      nib_valid   <= bus_en;
      nib_data    <= bus;
      sec_start   <= bus_en & ssp;
      frame_start <= bus_en & frp18;
      if (bus_en) begin
        if (ssp) begin
          pos.sector <= (frp18 || pos.sector == 4'(N_SECTORS - 1)) ? 4'd0 : pos.sector + 4'd1;
          pos.nibble <= NIB_IDLE;
          first_blk  <= 1'b1;
        end else if (smp) begin
          first_blk  <= 1'b0;
          pos.nibble <= 8'd0;
          if (first_blk) begin
            pos.group <= 5'd0;
            pos.block <= 3'd0;
          end else if (pos.block == 3'(N_BLOCKS - 1)) begin
            pos.block <= 3'd0;
            pos.group <= (pos.group == 5'(N_GROUPS - 1)) ? 5'd0 : pos.group + 5'd1;
          end else begin
            pos.block <= pos.block + 3'd1;
          end
        end else if (pos.nibble < NIB_IDLE) begin
          pos.nibble <= pos.nibble + 8'd1;
        end
      end
    end
  end

endmodule
