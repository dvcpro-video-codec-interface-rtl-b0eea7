// dvcpro_decoder: the FPGA logic of the interface card in decoder (receiver)
// mode. Two DVB-T packet streams come in; the DVCpro data is recombined and
// handed to the codec on its 4-bit BUS, and the codec's video leaves as SDI.
//
// Data side: a header decoder per stream finds the packets and stores the
// payload of every valid packet, tagged with its header, in that stream's
// packet FIFO (FIFO_PKTS deep), absorbing the variable delay between the two
// receivers. The read controller takes the packets from both FIFOs in header
// order and the DVCpro framer rebuilds the codec's nibble stream along the
// decoder's own DVCpro counters, re-inserting what was discarded, checking the
// per-sector CRC (error indicator) and generating FRP27.
// Clock side: the packet clock detector gives a pulse per packet of stream 0;
// the phase detector compares it with the VCXO clock divided by VCXO_DIV and
// drives the external PLL.
// Video side: the TRS generator adds the EAV/SAV words missing from the codec's
// video, and the SDI scrambler codes it for the serial output.
//
// One clock (the recovered 27 MHz) runs the whole block; the codec's BUS
// timing comes in as strobes with bus_en, as in dvcpro_counters.
//
// Lint notes: some sub-block outputs are left open on purpose. The counters run
// on the codec's strobes only (their BUS input is tied off, since the decoder
// drives BUS), so their nib_data and frame_start are unused; the FIFOs' rd_len,
// pkts_waiting and max_waiting are not needed because the framer reads whole
// payloads and the CRC tells it where a sector's data ends.
module dvcpro_decoder
  import dvcpro_pkg::*;
#(
  parameter int unsigned FIFO_PKTS  = 3,
  parameter int unsigned VCXO_DIV   = 2244,
  parameter int unsigned SAMPLE_RST = 552,
  parameter logic [4:0]  FRP_GROUP  = 5'd0,
  parameter logic [2:0]  FRP_BLOCK  = 3'd0,
  parameter logic [7:0]  FRP_NIBBLE = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  // two received DVB-T packet streams
  input  logic       rx_valid [2],
  input  logic [7:0] rx_data  [2],
  // codec compressed data side
  input  logic       bus_en,
  input  logic       smp,
  input  logic       ssp,
  input  logic       frp18,
  output logic       bus_valid,
  output logic [3:0] bus_out,
  output logic       frp27,
  // codec video side and SDI output
  input  logic       main_valid,
  input  logic [7:0] main_data,
  output logic [9:0] trs_video,
  output logic       sdi_valid,
  output logic [9:0] sdi_data,
  // clock recovery
  output logic       ref_present,
  output logic       pll_up,
  output logic       pll_down,
  // status
  output logic [2:0] mode,
  output logic       crc_ok,
  output logic       crc_err,
  output logic       underflow,
  output logic [1:0] overflow,
  output logic [1:0] sync_err,
  output logic [1:0] dummy_seen,
  output logic [1:0] locked,
  output logic       stale,
  output logic       skew_wait
);

  logic       wr_en [2], wr_commit [2], wr_abort [2], full [2];
  logic [7:0] wr_data [2];
  pkt_tag_t   wr_tag [2];
  logic       pkt_start [2];
  logic       rd_avail [2], rd_release [2];
  pkt_tag_t   rd_tag [2];
  logic [7:0] rd_off [2], rd_data [2], rd_len [2];
  logic [3:0] waiting [2], max_w [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    packet_header_decoder u_hdr (
      .clk, .rst_n, .rx_valid(rx_valid[c]), .rx_data(rx_data[c]),
      .wr_en(wr_en[c]), .wr_data(wr_data[c]), .wr_commit(wr_commit[c]),
      .wr_abort(wr_abort[c]), .wr_tag(wr_tag[c]), .full(full[c]),
      .locked(locked[c]), .pkt_start(pkt_start[c]), .sync_err(sync_err[c]),
      .overflow(overflow[c]), .dummy_seen(dummy_seen[c]));
    packet_fifo #(.NPKT(FIFO_PKTS)) u_fifo (
      .clk, .rst_n, .wr_en(wr_en[c]), .wr_data(wr_data[c]), .wr_commit(wr_commit[c]),
      .wr_abort(wr_abort[c]), .wr_tag(wr_tag[c]), .full(full[c]),
      .rd_avail(rd_avail[c]), .rd_tag(rd_tag[c]), .rd_len(rd_len[c]), .rd_off(rd_off[c]),
      .rd_data(rd_data[c]), .rd_release(rd_release[c]),
      .pkts_waiting(waiting[c]), .max_waiting(max_w[c]));
  end

  logic        req, ok, skip, new_sector;
  logic [7:0]  data;
  logic [2:0]  head_mode;
  logic [3:0]  sector;
  dv_pos_t     pos;
  logic        nib_valid, sec_start, frame_start;
  logic [3:0]  nib_data;
  logic        crc_init, crc_en;
  logic [7:0]  crc_data;
  logic [15:0] crc;

  read_controller u_rc (.clk, .rst_n, .rd_avail, .rd_tag, .rd_off, .rd_data, .rd_release,
                        .req, .ok, .data, .head_mode, .skip, .new_sector, .sector,
                        .stale, .skew_wait);
  dvcpro_counters u_cnt (.clk, .rst_n, .bus_en, .bus(4'h0), .smp, .ssp, .frp18,
                         .pos, .nib_valid, .nib_data, .sec_start, .frame_start);
  dvcpro_framer #(.FRP_GROUP(FRP_GROUP), .FRP_BLOCK(FRP_BLOCK), .FRP_NIBBLE(FRP_NIBBLE)) u_frm (
    .clk, .rst_n, .pos, .nib_valid, .sec_start, .req, .ok, .data, .head_mode, .skip,
    .new_sector, .sector, .crc_init, .crc_en, .crc_data, .crc, .bus_valid, .bus_out,
    .frp27, .mode, .underflow, .crc_ok, .crc_err);
  crc16_ccitt u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .data(crc_data), .crc);

  // clock recovery
  logic pkt_clk, div_tick;
  packet_clock_detector #(.TIMEOUT(4*VCXO_DIV)) u_pcd (.clk, .rst_n, .pkt_start(pkt_start[0]),
                                                       .pkt_clk, .present(ref_present));
  packet_clock #(.DIV(VCXO_DIV)) u_vdiv (.clk, .rst_n, .en(1'b1), .sync(1'b0), .tick(div_tick));
  phase_detector u_pd (.clk, .rst_n, .ref_present, .ref_pulse(pkt_clk), .div_pulse(div_tick),
                       .up(pll_up), .down(pll_down));

  // video path
  trs_generator #(.SAMPLE_RST(SAMPLE_RST)) u_trs (.clk, .rst_n, .en(main_valid), .frp(frp27),
                                                  .vid_in(main_data), .vid_out(trs_video));
  sdi_scrambler u_scr (.clk, .rst_n, .en(main_valid), .din(trs_video),
                       .dout_valid(sdi_valid), .dout(sdi_data));

endmodule
