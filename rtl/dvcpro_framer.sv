// dvcpro_framer: rebuilds, in decoder mode, the complete DVCpro nibble stream
// that the codec expects on its 4-bit BUS, from the reduced byte stream of the
// read controller.
//
// The decoder's DVCpro counters follow the codec's own SMP/SSP/FRP18 timing.
// For every nibble slot the framer asks keep_nibble() whether the coder sent it
// in the data rate option named in the packet headers: if so, the next byte is
// pulled from the read controller (upper nibble first, lower nibble in the next
// slot); if not, the discarded data is replaced by a fill nibble (0). When no
// byte is available, fill is sent too and underflow pulses.
// At each sector start the two CRC bytes that follow the sector's data are
// pulled into the CRC checker, which ran over all the sector's data; a zero
// register gives crc_ok, anything else crc_err (the "error indicator"). The
// rest of the packet (its zero padding) is skipped and the read controller is
// told which sector comes next.
// The framer also makes the decoder's FRP27: a one-cycle pulse when the
// counters reach one chosen position of sector 0. The document fixes that phase
// by experiment and does not give it, so the position is a set of parameters.
// The fill value and the regeneration of nothing but fill for dropped blocks are
// this design's choices.
//
// Timing: bus_out is registered and carries the nibble for the slot the
// counters reported in the previous cycle, i.e. two cycles after the codec's
// strobe. The CRC check takes the three cycles after SSP; the codec's lead-in
// (4 bytes before the first block) leaves room for it.
//
// crc_data is the data input passed straight on to the external CRC checker
// (only crc_en is generated here), so it is a wire from input to output.
module dvcpro_framer
  import dvcpro_pkg::*;
#(
  parameter logic [4:0] FRP_GROUP  = 5'd0,
  parameter logic [2:0] FRP_BLOCK  = 3'd0,
  parameter logic [7:0] FRP_NIBBLE = 8'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the decoder's DVCpro counters
  input  dv_pos_t     pos,
  input  logic        nib_valid,
  input  logic        sec_start,
  // read controller
  output logic        req,
  input  logic        ok,
  input  logic [7:0]  data,
  input  logic [2:0]  head_mode,
  output logic        skip,
  output logic        new_sector,
  output logic [3:0]  sector,
  // CRC checker
  output logic        crc_init,
  output logic        crc_en,
  output logic [7:0]  crc_data,
  input  logic [15:0] crc,
  // codec side
  output logic        bus_valid,
  output logic [3:0]  bus_out,
  output logic        frp27,
  // status
  output logic [2:0]  mode,
  output logic        underflow,
  output logic        crc_ok,
  output logic        crc_err
);

  typedef enum logic [1:0] {S_DATA, S_CRC1, S_CRC2, S_CHECK} state_t;
  state_t     st;
  logic       lo_pend;
  logic [3:0] lo_nib;
  logic       have_data, bad;
  logic [3:0] next_sector;
  logic       keep, want;

  always_comb begin
    keep       = st == S_DATA && nib_valid && keep_nibble(mode, pos.group, pos.block, pos.nibble);
    want       = (keep && !lo_pend) || st == S_CRC1 || st == S_CRC2;
    req        = want;
    crc_en     = want && ok;
    crc_data   = data;
    skip       = st == S_CHECK;
    new_sector = (st == S_CHECK) || (st == S_DATA && sec_start && !have_data);
    sector     = (st == S_CHECK) ? next_sector : pos.sector;
    crc_init   = new_sector;
    underflow  = want && !ok;
    crc_ok     = st == S_CHECK && !bad && crc == 16'h0000;
    crc_err    = st == S_CHECK && (bad || crc != 16'h0000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_DATA;
      lo_pend     <= 1'b0;
      lo_nib      <= '0;
      have_data   <= 1'b0;
      bad         <= 1'b0;
      next_sector <= '0;
      mode        <= MODE_32M256;
      bus_valid   <= 1'b0;
      bus_out     <= '0;
      frp27       <= 1'b0;
    end else begin
      bus_valid <= nib_valid;
      frp27     <= nib_valid && pos.sector == 4'd0 && pos.group == FRP_GROUP &&
                   pos.block == FRP_BLOCK && pos.nibble == FRP_NIBBLE;
      if (st == S_DATA && ok) mode <= head_mode;
      if (want && !ok) bad <= 1'b1;
      if (nib_valid) bus_out <= 4'h0;
      case (st)
        S_DATA: begin
          if (sec_start) begin
            lo_pend <= 1'b0;
            if (have_data) begin
              st          <= S_CRC1;
              next_sector <= pos.sector;
            end else begin
              bad <= 1'b0;
            end
          end else if (keep) begin
            if (!lo_pend) begin
              lo_pend   <= 1'b1;
              bus_out   <= ok ? data[7:4] : 4'h0;
              lo_nib    <= ok ? data[3:0] : 4'h0;
              have_data <= 1'b1;
            end else begin
              lo_pend <= 1'b0;
              bus_out <= lo_nib;
            end
          end
        end
        S_CRC1:  st <= S_CRC2;
        S_CRC2:  st <= S_CHECK;
        S_CHECK: begin
          st        <= S_DATA;
          have_data <= 1'b0;
          bad       <= 1'b0;
        end
        default: st <= S_DATA;
      endcase
    end
  end

endmodule
