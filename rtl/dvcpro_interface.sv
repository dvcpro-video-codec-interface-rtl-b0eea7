// dvcpro_interface: the DVCpro codec interface of a digital radio camera link.
//
// The card sits between a DVCpro25 codec and two DVB-T channels. The same board
// is loaded with a coder or a decoder configuration; this top holds both, side
// by side, each with its own ports: the coder for the camera-back transmitter,
// the decoder for the receiver. Connecting the coder's two packet outputs to
// the decoder's two packet inputs (through any two channels with independent
// delays) and the codec between them gives the complete link.
// Parameters are those of the two halves, at their defaults: 3-packet FIFOs,
// a 1122-cycle packet clock in the coder and a 2244-cycle VCXO divider in the
// decoder (27 MHz clock).
// A third group of ports (t_) carries the proposed second-generation error
// protection: 141-byte packets go through the RS(187,141) encoder and the time
// interleaver (N = 748 packets of 187 bytes) to the link; the receive side is
// the de-interleaver, which gives back the coded 187-byte packets. This path
// stands beside the present coder and decoder, which do not use it; the RS
// decoder and the 141-byte packet format are not built.
module dvcpro_interface
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // ---------------- coder ----------------
  input  logic [2:0] c_mode,
  input  logic       c_sel_sdi,
  input  logic       c_lvds_valid,
  input  logic [7:0] c_lvds_data,
  input  logic       c_sdi_valid,
  input  logic [9:0] c_sdi_data,
  output logic       c_main_valid,
  output logic [7:0] c_main_data,
  output logic       c_frp27,
  input  logic       c_bus_en,
  input  logic [3:0] c_bus,
  input  logic       c_smp,
  input  logic       c_ssp,
  input  logic       c_frp18,
  output logic       c_aes_cs_n,
  output logic       c_aes_sclk,
  output logic       c_aes_data,
  output logic       c_aes_cfg_done,
  output logic [1:0] c_ch_valid,
  output logic [1:0] c_ch_sop,
  output logic [7:0] c_ch_data [2],
  output logic       c_dummy_pkt,
  output logic       c_fifo_overflow,
  output logic [3:0] c_pkts_waiting,
  output logic [3:0] c_max_waiting,
  // ---------------- decoder ----------------
  input  logic       d_rx_valid [2],
  input  logic [7:0] d_rx_data  [2],
  input  logic       d_bus_en,
  input  logic       d_smp,
  input  logic       d_ssp,
  input  logic       d_frp18,
  output logic       d_bus_valid,
  output logic [3:0] d_bus_out,
  output logic       d_frp27,
  input  logic       d_main_valid,
  input  logic [7:0] d_main_data,
  output logic [9:0] d_trs_video,
  output logic       d_sdi_valid,
  output logic [9:0] d_sdi_data,
  output logic       d_ref_present,
  output logic       d_pll_up,
  output logic       d_pll_down,
  output logic [2:0] d_mode,
  output logic       d_crc_ok,
  output logic       d_crc_err,
  output logic       d_underflow,
  output logic [1:0] d_overflow,
  output logic [1:0] d_sync_err,
  output logic [1:0] d_dummy_seen,
  output logic [1:0] d_locked,
  output logic       d_stale,
  output logic       d_skew_wait,
  // RS encoder and time interleaver (transmit), de-interleaver (receive)
  input  logic       t_in_valid,
  input  logic [7:0] t_in_data,
  output logic       t_in_ready,
  output logic       t_rs_last,
  input  logic       t_link_ready,
  output logic       t_link_valid,
  output logic       t_link_first,
  output logic [7:0] t_link_data,
  input  logic       t_rx_valid,
  input  logic [7:0] t_rx_data,
  output logic       t_rx_ready,
  input  logic       t_out_ready,
  output logic       t_out_valid,
  output logic       t_out_first,
  output logic [7:0] t_out_data
);

  dvcpro_coder u_coder (
    .clk, .rst_n, .mode(c_mode), .sel_sdi(c_sel_sdi),
    .lvds_valid(c_lvds_valid), .lvds_data(c_lvds_data),
    .sdi_valid(c_sdi_valid), .sdi_data(c_sdi_data),
    .main_valid(c_main_valid), .main_data(c_main_data), .frp27(c_frp27),
    .bus_en(c_bus_en), .bus(c_bus), .smp(c_smp), .ssp(c_ssp), .frp18(c_frp18),
    .aes_cs_n(c_aes_cs_n), .aes_sclk(c_aes_sclk), .aes_data(c_aes_data),
    .aes_cfg_done(c_aes_cfg_done),
    .ch_valid(c_ch_valid), .ch_sop(c_ch_sop), .ch_data(c_ch_data),
    .dummy_pkt(c_dummy_pkt), .fifo_overflow(c_fifo_overflow),
    .pkts_waiting(c_pkts_waiting), .max_waiting(c_max_waiting));

  dvcpro_decoder u_decoder (
    .clk, .rst_n, .rx_valid(d_rx_valid), .rx_data(d_rx_data),
    .bus_en(d_bus_en), .smp(d_smp), .ssp(d_ssp), .frp18(d_frp18),
    .bus_valid(d_bus_valid), .bus_out(d_bus_out), .frp27(d_frp27),
    .main_valid(d_main_valid), .main_data(d_main_data), .trs_video(d_trs_video),
    .sdi_valid(d_sdi_valid), .sdi_data(d_sdi_data),
    .ref_present(d_ref_present), .pll_up(d_pll_up), .pll_down(d_pll_down),
    .mode(d_mode), .crc_ok(d_crc_ok), .crc_err(d_crc_err), .underflow(d_underflow),
    .overflow(d_overflow), .sync_err(d_sync_err), .dummy_seen(d_dummy_seen),
    .locked(d_locked), .stale(d_stale), .skew_wait(d_skew_wait));

  logic       rs_valid, rs_ready;
  logic [7:0] rs_data;

  rs_encoder u_rs (
    .clk, .rst_n, .in_valid(t_in_valid), .in_data(t_in_data), .in_ready(t_in_ready),
    .out_ready(rs_ready), .out_valid(rs_valid), .out_last(t_rs_last), .out_data(rs_data));

  time_interleaver #(.DEINT(1'b0)) u_tint (
    .clk, .rst_n, .in_valid(rs_valid), .in_data(rs_data), .in_ready(rs_ready),
    .out_ready(t_link_ready), .out_valid(t_link_valid), .out_first(t_link_first),
    .out_data(t_link_data));

  time_interleaver #(.DEINT(1'b1)) u_tdei (
    .clk, .rst_n, .in_valid(t_rx_valid), .in_data(t_rx_data), .in_ready(t_rx_ready),
    .out_ready(t_out_ready), .out_valid(t_out_valid), .out_first(t_out_first),
    .out_data(t_out_data));

endmodule
