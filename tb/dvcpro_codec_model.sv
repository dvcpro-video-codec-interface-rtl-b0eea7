// dvcpro_codec_model: behavioural model of the DVCpro codec's compressed-data
// bus timing, for testbenches only (not synthesizable logic of the design).
//
// It emits one nibble every NIB_PERIOD cycles (bus_en), in sectors of 29664
// nibbles: an 8-nibble lead-in whose first nibble carries SSP (and FRP18 in
// sector 0), 168 blocks of 176 nibbles (160 data + 16 padding) each starting
// with SMP, and an 88-nibble tail. With NIB_PERIOD = 3 at 27 MHz this is close
// to the 35.6 Mbit/s of the real bus. The nibble value is a fixed function of
// the frame, sector, group, block and nibble, so that a checker can recompute
// it. The model starts after START cycles and also reports its position.
module dvcpro_codec_model #(
  parameter int unsigned START      = 10,
  parameter int unsigned NIB_PERIOD = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       bus_en,
  output logic [3:0] bus,
  output logic       smp,
  output logic       ssp,
  output logic       frp18,
  output int         frame,
  output int         sector,
  output int         group,
  output int         block,
  output int         nibble      // -1 outside a block
);

  localparam int LEAD = 8, BLK = 176, NBLK = 168, SECTOR_NIBS = 29664;

  int cyc, ph, idx;

  function automatic logic [3:0] nib_value(int f, int s, int g, int b, int n);
    int h;
    h = f * 7919 + s * 613 + g * 97 + b * 31 + n * 5 + (n >> 3) * 11;
    return 4'((h ^ (h >> 4) ^ (h >> 9)) & 15);
  endfunction

  always_comb begin
    int rel;
    rel    = idx - LEAD;
    smp    = 1'b0;
    ssp    = 1'b0;
    frp18  = 1'b0;
    group  = 0;
    block  = 0;
    nibble = -1;
    if (idx == 0) begin
      ssp   = 1'b1;
      frp18 = sector == 0;
    end
    if (rel >= 0 && rel < NBLK * BLK) begin
      group  = (rel / BLK) / 6;
      block  = (rel / BLK) % 6;
      nibble = rel % BLK;
      smp    = nibble == 0;
    end
    bus = (nibble >= 0 && nibble < 160) ? nib_value(frame, sector, group, block, nibble) : 4'h0;
    if (!bus_en) begin
      smp = 1'b0; ssp = 1'b0; frp18 = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; ph <= 0; idx <= 0; sector <= 0; frame <= 0; bus_en <= 1'b0;
    end else begin
      if (cyc < int'(START)) begin
        cyc <= cyc + 1;
        bus_en <= (cyc == int'(START) - 1);
        ph <= 0;
      end else begin
        if (bus_en) begin
          if (idx == SECTOR_NIBS - 1) begin
            idx <= 0;
            if (sector == 11) begin sector <= 0; frame <= frame + 1; end
            else sector <= sector + 1;
          end else idx <= idx + 1;
        end
        ph     <= (ph == int'(NIB_PERIOD) - 1) ? 0 : ph + 1;
        bus_en <= (ph == int'(NIB_PERIOD) - 1);
      end
    end
  end

endmodule
