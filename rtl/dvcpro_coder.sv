// dvcpro_coder: the FPGA logic of the interface card in coder (transmitter)
// mode. Uncompressed video goes to the DVCpro codec; the codec's compressed
// data comes back on the 4-bit BUS and leaves as DVB-T transport packets split
// over two modulators.
//
// Video side: the input switch picks the LVDS camera input or the descrambled
// SDI input for the codec's MAIN bus, and the frame pulse generator derives
// FRP27 from the TRS words of that video. The AES receiver is configured once
// after reset.
// Data side: the DVCpro counters locate every BUS nibble; the rate reducer keeps
// the nibbles of the selected data rate option (mode) and packs them into bytes;
// the CRC generator covers each sector; the packet writer cuts the bytes into
// 182-byte payloads, appends the CRC at the end of a sector and stores packets
// in the packet FIFO (FIFO_PKTS deep). On every tick of the packet clock the
// packet reader sends a packet (with its 6-byte header) or, if none is ready, a
// dummy packet, and the de-multiplexer alternates packets between the two
// outputs.
//
// The whole block runs on one clock (the 27 MHz video clock); the codec's
// 18 MHz BUS is taken as a nibble per cycle with bus_en high. This single-clock
// arrangement is this design's choice.
//
// Lint notes: the counters' frame_start and the FIFO's rd_len are left open on
// purpose. Frames need no action here (the sector address already runs 0..11),
// and the FIFO already returns zero past a packet's length, which is the
// zero padding the packet reader needs.
module dvcpro_coder
  import dvcpro_pkg::*;
#(
  parameter int unsigned FIFO_PKTS = 3,
  parameter int unsigned PKT_DIV   = 1122
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] mode,
  input  logic       sel_sdi,
  // video inputs
  input  logic       lvds_valid,
  input  logic [7:0] lvds_data,
  input  logic       sdi_valid,
  input  logic [9:0] sdi_data,
  // codec video side
  output logic       main_valid,
  output logic [7:0] main_data,
  output logic       frp27,
  // codec compressed data side
  input  logic       bus_en,
  input  logic [3:0] bus,
  input  logic       smp,
  input  logic       ssp,
  input  logic       frp18,
  // AES receiver configuration
  output logic       aes_cs_n,
  output logic       aes_sclk,
  output logic       aes_data,
  output logic       aes_cfg_done,
  // two DVB-T packet streams
  output logic [1:0] ch_valid,
  output logic [1:0] ch_sop,
  output logic [7:0] ch_data [2],
  // status
  output logic       dummy_pkt,
  output logic       fifo_overflow,
  output logic [3:0] pkts_waiting,
  output logic [3:0] max_waiting
);

  // video path
  logic       dsc_valid;
  logic [9:0] dsc_data;

  sdi_descrambler u_dsc (.clk, .rst_n, .en(sdi_valid), .din(sdi_data),
                         .dout_valid(dsc_valid), .dout(dsc_data));
  input_switch u_sw (.clk, .rst_n, .sel_sdi, .lvds_valid, .lvds_data,
                     .sdi_valid(dsc_valid), .sdi_data(dsc_data), .main_valid, .main_data);
  frp27_generator u_frp (.clk, .rst_n, .en(main_valid), .din(main_data), .frp27);
  aes_rx_config u_aes (.clk, .rst_n, .cfg_cs_n(aes_cs_n), .cfg_sclk(aes_sclk),
                       .cfg_data(aes_data), .done(aes_cfg_done));

  // compressed data path
  dv_pos_t     pos;
  logic        nib_valid, sec_start, frame_start;
  logic [3:0]  nib_data;
  logic        byte_valid, sector_end;
  logic [7:0]  byte_data;
  logic [3:0]  byte_sector, end_sector;
  logic [2:0]  byte_mode, end_mode;
  logic [15:0] crc;
  logic        wr_en, wr_commit, full;
  logic [7:0]  wr_data;
  pkt_tag_t    wr_tag;
  logic        rd_avail, rd_release;
  pkt_tag_t    rd_tag;
  logic [7:0]  rd_len, rd_off, rd_data;
  logic        tick;
  logic        tx_valid, tx_sop, tx_chan;
  logic [7:0]  tx_data;

  dvcpro_counters u_cnt (.clk, .rst_n, .bus_en, .bus, .smp, .ssp, .frp18,
                         .pos, .nib_valid, .nib_data, .sec_start, .frame_start);
  rate_reducer u_red (.clk, .rst_n, .mode, .pos, .nib_valid, .nib_data, .sec_start,
                      .byte_valid, .byte_data, .byte_sector, .byte_mode, .sector_end, .end_sector,
                      .end_mode);
  crc16_ccitt u_crc (.clk, .rst_n, .init(sector_end), .en(byte_valid), .data(byte_data), .crc);
  packet_writer u_wr (.clk, .rst_n, .byte_valid, .byte_data, .byte_sector, .byte_mode,
                      .sector_end, .end_sector, .end_mode, .crc, .wr_en, .wr_data, .wr_commit,
                      .wr_tag, .full, .overflow(fifo_overflow));
  packet_fifo #(.NPKT(FIFO_PKTS)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .wr_commit, .wr_abort(1'b0), .wr_tag, .full,
    .rd_avail, .rd_tag, .rd_len, .rd_off, .rd_data, .rd_release, .pkts_waiting, .max_waiting);
  packet_clock #(.DIV(PKT_DIV)) u_pclk (.clk, .rst_n, .en(1'b1), .sync(1'b0), .tick);
  packet_reader u_rd (.clk, .rst_n, .tick, .mode, .rd_avail, .rd_tag, .rd_off, .rd_data,
                      .rd_release, .tx_valid, .tx_sop, .tx_data, .tx_chan, .dummy(dummy_pkt));
  packet_demux u_dmx (.clk, .rst_n, .tx_valid, .tx_sop, .tx_data, .tx_chan,
                      .ch_valid, .ch_sop, .ch_data);

endmodule
