// tb_dvcpro_interface: end-to-end test of the DVCpro interface at its default
// parameters. A codec model feeds the coder's BUS for two frames; the coder's
// two packet streams reach the decoder through two delay lines of different
// length (the two DVB-T links); a second codec model, lagging the first, pulls
// the rebuilt nibble stream from the decoder. Every nibble the decoder hands
// to the codec is compared with the value the coder received (or with fill for
// data the selected rate option discards).
// Exercised and counted: the four data rate options (mode switches at sector
// boundaries, followed by the decoder through the headers), dummy packets, the
// alternation over the two channels, waiting for the late channel, one
// corrupted byte caught by the sector CRC, FIFO depth (no overflow, no
// underflow), the coder's FRP27 from the LVDS and from the SDI input, AES
// configuration, the decoder's FRP27 and TRS insertion, and the packet-clock
// phase detector. Beside the link, the proposed error protection runs on
// random 141-byte packets: RS(187,141) encoder, time interleaver (748 x 187
// bytes), a burst of corrupted bytes, de-interleaver. Counted are the restored
// bytes, the received packets that are RS codewords (zero syndromes), and the
// worst number of burst errors in any one packet (must be within the code's 23).
module tb_dvcpro_interface;
  import dvcpro_pkg::*;

  localparam int DEC_LAG   = 6500;   // decoder codec timing behind the coder's
  localparam int DLY0      = 150;    // link delay, channel 0
  localparam int DLY1      = 1400;    // link delay, channel 1
  localparam int SECTORS   = 24;     // two frames
  localparam int SECTOR_CYC = 29664 * 3;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- coder-side codec model ----------------
  logic c_bus_en, c_smp, c_ssp, c_frp18;
  logic [3:0] c_bus;
  int cf, cs, cg, cb, cn;
  dvcpro_codec_model #(.START(20)) u_cmodel (.clk, .rst_n, .bus_en(c_bus_en), .bus(c_bus),
    .smp(c_smp), .ssp(c_ssp), .frp18(c_frp18), .frame(cf), .sector(cs), .group(cg),
    .block(cb), .nibble(cn));

  // ---------------- decoder-side codec model ----------------
  logic d_bus_en, d_smp, d_ssp, d_frp18, d_dummy_bus;
  logic [3:0] d_bus_unused;
  int df, ds, dg, db, dn;
  dvcpro_codec_model #(.START(20 + DEC_LAG)) u_dmodel (.clk, .rst_n, .bus_en(d_bus_en),
    .bus(d_bus_unused), .smp(d_smp), .ssp(d_ssp), .frp18(d_frp18), .frame(df), .sector(ds),
    .group(dg), .block(db), .nibble(dn));

  // mode schedule: frame 0 mode 0; frame 1 sectors 0-2 mode 1, 3-5 mode 2,
  // 6-8 mode 3, 9-11 mode 0
  function automatic int mode_of(int f, int s);
    if (f == 0) return 0;
    if (s < 3) return 1;
    if (s < 6) return 2;
    if (s < 9) return 3;
    return 0;
  endfunction

  // independent keep rule (document Section 3.2 with this design's block map)
  function automatic bit keep_ref(int m, int g, int b, int n);
    bit ctrl, video, audio;
    if (n < 0 || n >= 160) return 0;
    ctrl  = g == 0;
    video = g != 0 && b < 5;
    audio = g != 0 && b == 5 && (g % 3) == 1;
    case (m)
      0: return 1;
      1: return ctrl || video || audio;
      2: return ctrl || video;
      default: return video && n >= 6;
    endcase
  endfunction

  function automatic logic [3:0] nib_ref(int f, int s, int g, int b, int n);
    int h;
    h = f * 7919 + s * 613 + g * 97 + b * 31 + n * 5 + (n >> 3) * 11;
    return 4'((h ^ (h >> 4) ^ (h >> 9)) & 15);
  endfunction

  logic [2:0] c_mode;
  always_ff @(posedge clk) if (c_bus_en && c_ssp) c_mode <= 3'(mode_of(cf, cs));
  initial c_mode = 3'd0;

  // ---------------- uncompressed video into the coder ----------------
  // short synthetic "lines": TRS every 64 bytes, F toggling every 40 TRS
  logic        c_sel_sdi;
  logic [7:0]  vbyte;
  int          vcnt, trs_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin vcnt <= 0; trs_n <= 0; end
    else begin
      vcnt <= (vcnt == 63) ? 0 : vcnt + 1;
      if (vcnt == 63) trs_n <= trs_n + 1;
    end
  end
  always_comb begin
    case (vcnt)
      0: vbyte = 8'hFF;
      1, 2: vbyte = 8'h00;
      3: vbyte = {1'b1, 1'(((trs_n / 40) % 2)), 6'b010101};
      default: vbyte = 8'h10 + 8'(vcnt);
    endcase
  end
  logic       scr_valid;
  logic [9:0] scr_data;
  sdi_scrambler u_vscr (.clk, .rst_n, .en(1'b1), .din({vbyte, 2'b00}),
                        .dout_valid(scr_valid), .dout(scr_data));

  // ---------------- DUT ----------------
  logic       c_main_valid, c_frp27, c_aes_cs_n, c_aes_sclk, c_aes_data, c_aes_cfg_done;
  logic [7:0] c_main_data;
  logic [1:0] c_ch_valid, c_ch_sop;
  logic [7:0] c_ch_data [2];
  logic       c_dummy_pkt, c_fifo_overflow;
  logic [3:0] c_pkts_waiting, c_max_waiting;
  logic       d_rx_valid [2];
  logic [7:0] d_rx_data [2];
  logic       d_bus_valid, d_frp27, d_sdi_valid, d_ref_present, d_pll_up, d_pll_down;
  logic [3:0] d_bus_out;
  logic [9:0] d_trs_video, d_sdi_data;
  logic [2:0] d_mode;
  logic       d_crc_ok, d_crc_err, d_underflow, d_stale, d_skew_wait;
  logic [1:0] d_overflow, d_sync_err, d_dummy_seen, d_locked;
  logic [7:0] d_main_data;

  // ---------------- time interleaver pair ----------------
  localparam int TI_N = 748, TI_R = 187, TI_BLOCK = TI_N * TI_R, TI_BURST = 2000;
  logic       t_rs_last;
  int ti_ncw = 0, ti_ncw_ok = 0;
  int ti_alog [512], ti_glog [256];
  int ti_cw [TI_R];
  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      ti_alog[i] = x; ti_alog[i + 255] = x; ti_glog[x] = i;
      x = x << 1; if (x & 256) x = x ^ 'h11D;
    end
  end
  function automatic int gfm(int a, int b);
    if (a == 0 || b == 0) return 0;
    return ti_alog[ti_glog[a] + ti_glog[b]];
  endfunction
  function automatic bit is_codeword();
    for (int j = 0; j < 46; j++) begin
      int s;
      s = 0;
      for (int i = 0; i < TI_R; i++) s = gfm(s, ti_alog[j]) ^ ti_cw[i];
      if (s != 0) return 0;
    end
    return 1;
  endfunction
  logic       t_in_valid = 0, t_in_ready, t_link_valid, t_link_first, t_rx_ready;
  logic       t_out_valid, t_out_first;
  logic [7:0] t_in_data = 0, t_link_data, t_out_data;
  logic [7:0] ti_sent [$];
  int ti_nin = 0, ti_nlink = 0, ti_nout = 0, ti_bad = 0, ti_first = 0, ti_worst = 0;
  int ti_err [TI_N];
  initial for (int i = 0; i < TI_N; i++) ti_err[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (t_in_valid && t_in_ready) ti_nin++;
    if (dut.rs_valid && dut.rs_ready) ti_sent.push_back(dut.rs_data);
    if (t_link_valid) ti_nlink++;
    if (t_out_valid) begin
      if (t_out_first) ti_first++;
      ti_cw[ti_nout % TI_R] = int'(t_out_data);
      if (ti_nout % TI_R == TI_R - 1 && ti_nout / TI_BLOCK != 1) begin
        ti_ncw++;
        if (is_codeword()) ti_ncw_ok++;
      end
      if (t_out_data != ti_sent[ti_nout]) begin
        if (ti_nout / TI_BLOCK == 1) ti_err[(ti_nout % TI_BLOCK) / TI_R]++;
        else ti_bad++;
      end
      ti_nout++;
    end
  end
  always @(negedge clk) if (rst_n) begin
    t_in_valid = ti_nin < 3 * TI_N * 141;
    t_in_data  = 8'($urandom);
  end

  dvcpro_interface dut (
    .t_in_valid, .t_in_data, .t_in_ready, .t_rs_last, .t_link_ready(t_rx_ready), .t_link_valid,
    .t_link_first, .t_link_data, .t_rx_valid(t_link_valid),
    .t_rx_data((ti_nlink >= TI_BLOCK + 5000 && ti_nlink < TI_BLOCK + 5000 + TI_BURST) ?
               ~t_link_data : t_link_data),
    .t_rx_ready, .t_out_ready(1'b1), .t_out_valid, .t_out_first, .t_out_data,
    .clk, .rst_n,
    .c_mode, .c_sel_sdi, .c_lvds_valid(1'b1), .c_lvds_data(vbyte),
    .c_sdi_valid(scr_valid), .c_sdi_data(scr_data),
    .c_main_valid, .c_main_data, .c_frp27,
    .c_bus_en, .c_bus, .c_smp, .c_ssp, .c_frp18,
    .c_aes_cs_n, .c_aes_sclk, .c_aes_data, .c_aes_cfg_done,
    .c_ch_valid, .c_ch_sop, .c_ch_data, .c_dummy_pkt, .c_fifo_overflow,
    .c_pkts_waiting, .c_max_waiting,
    .d_rx_valid, .d_rx_data, .d_bus_en, .d_smp, .d_ssp, .d_frp18,
    .d_bus_valid, .d_bus_out, .d_frp27, .d_main_valid(1'b1), .d_main_data,
    .d_trs_video, .d_sdi_valid, .d_sdi_data, .d_ref_present, .d_pll_up, .d_pll_down,
    .d_mode, .d_crc_ok, .d_crc_err, .d_underflow, .d_overflow, .d_sync_err,
    .d_dummy_seen, .d_locked, .d_stale, .d_skew_wait);

  assign d_main_data = 8'h80;

  // ---------------- the two links ----------------
  logic [8:0] line0 [DLY0];
  logic [8:0] line1 [DLY1];
  int lp0, lp1;
  bit corrupt_done;
  int ch1_pkt_idx, corrupt_sector;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lp0 <= 0; lp1 <= 0; corrupt_done <= 0; ch1_pkt_idx <= 0; corrupt_sector <= -1;
      for (int i = 0; i < DLY0; i++) line0[i] <= '0;
      for (int i = 0; i < DLY1; i++) line1[i] <= '0;
    end else begin
      logic [7:0] b1;
      b1 = c_ch_data[1];
      if (c_ch_valid[1]) ch1_pkt_idx <= c_ch_sop[1] ? 1 : ch1_pkt_idx + 1;
      // corrupt one payload byte of a valid channel-1 packet in frame 1, sector 10
      if (!corrupt_done && c_ch_valid[1] && ch1_pkt_idx == 100 && cf == 1 && cs == 10 &&
          dut.u_coder.u_rd.is_dummy == 1'b0) begin
        b1 = b1 ^ 8'h5A;
        corrupt_done   <= 1;
        corrupt_sector <= int'(dut.u_coder.u_rd.tag.sector);
      end
      line0[lp0] <= {c_ch_valid[0], c_ch_data[0]};
      line1[lp1] <= {c_ch_valid[1], b1};
      lp0 <= (lp0 == DLY0 - 1) ? 0 : lp0 + 1;
      lp1 <= (lp1 == DLY1 - 1) ? 0 : lp1 + 1;
    end
  end
  always_comb begin
    {d_rx_valid[0], d_rx_data[0]} = line0[lp0];
    {d_rx_valid[1], d_rx_data[1]} = line1[lp1];
  end

  // ---------------- checking the rebuilt BUS ----------------
  // expected nibble for the decoder model's slot, two cycles later
  logic [3:0] exp_q [2];
  logic       expv_q [2];
  int         exps_q [2], expf_q [2];
  int n_mismatch = 0, n_checked = 0, n_crc_ok = 0, n_crc_err = 0;
  int n_dummy = 0, n_ch0 = 0, n_ch1 = 0, n_skew = 0, n_under = 0, n_over = 0;
  int n_cfrp_lvds = 0, n_cfrp_sdi = 0, n_dfrp = 0, n_trs_ff = 0, n_up = 0, n_down = 0;
  int n_modes [4];
  int n_mode_seen [4];
  logic c_frp27_q;

  always_ff @(posedge clk) begin
    exp_q[1]  <= exp_q[0];
    expv_q[1] <= expv_q[0];
    exps_q[1] <= exps_q[0];
    expf_q[1] <= expf_q[0];
    expv_q[0] <= d_bus_en;
    exps_q[0] <= ds;
    expf_q[0] <= df;
    exp_q[0]  <= keep_ref(mode_of(df, ds), dg, db, dn) ? nib_ref(df, ds, dg, db, dn) : 4'h0;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin n_modes[i] = 0; n_mode_seen[i] = 0; end
  end

  always_ff @(posedge clk) if (rst_n) begin
    if (expv_q[1] != d_bus_valid) begin
      failures++;
      if (failures < 10) $display("bus_valid misaligned at %0t", $time);
    end
    if (expv_q[1] && d_bus_valid && expf_q[1] * 12 + exps_q[1] < SECTORS) begin
      // skip the sector whose packet was corrupted on purpose
      if (!(expf_q[1] == 1 && exps_q[1] == corrupt_sector)) begin
        n_checked++;
        if (d_bus_out != exp_q[1]) begin
          n_mismatch++;
          if (n_mismatch < 10)
            $display("BUS mismatch f%0d s%0d: got %h exp %h at %0t", expf_q[1], exps_q[1],
                     d_bus_out, exp_q[1], $time);
        end
      end
    end
    if (d_crc_ok) n_crc_ok++;
    if (d_crc_err) begin
      n_crc_err++;
      $display("CRC error reported at %0t (decoder frame %0d sector %0d)", $time, df, ds);
    end
    if (c_dummy_pkt) n_dummy++;
    if (c_ch_sop[0]) n_ch0++;
    if (c_ch_sop[1]) n_ch1++;
    if (d_skew_wait) n_skew++;
    if (d_underflow) n_under++;
    if (d_overflow != 0 || c_fifo_overflow) n_over++;
    c_frp27_q <= c_frp27;
    if (c_frp27 && !c_frp27_q) begin
      if (c_sel_sdi) n_cfrp_sdi++; else n_cfrp_lvds++;
    end
    if (d_frp27) n_dfrp++;
    if (d_trs_video == 10'h3FF) n_trs_ff++;
    if (d_pll_up) n_up++;
    if (d_pll_down) n_down++;
    if (c_bus_en && c_ssp) n_modes[mode_of(cf, cs)]++;
    if (d_bus_en && d_ssp && df * 12 + ds > 0 && df * 12 + ds <= SECTORS)
      n_mode_seen[dut.u_decoder.u_frm.mode]++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    c_sel_sdi = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // switch the coder's video input to SDI halfway
    repeat (SECTORS * SECTOR_CYC / 2) @(posedge clk);
    c_sel_sdi = 1;
    repeat (SECTORS * SECTOR_CYC / 2 + DEC_LAG + 2000) @(posedge clk);
    $display("checked %0d nibbles, %0d mismatches", n_checked, n_mismatch);
    $display("crc ok %0d err %0d, dummy %0d, ch0 %0d ch1 %0d, skew waits %0d",
             n_crc_ok, n_crc_err, n_dummy, n_ch0, n_ch1, n_skew);
    $display("underflow %0d overflow %0d, coder MAX %0d, frp27 lvds %0d sdi %0d dec %0d, TRS FF %0d, up %0d down %0d",
             n_under, n_over, c_max_waiting, n_cfrp_lvds, n_cfrp_sdi, n_dfrp, n_trs_ff, n_up, n_down);
    $display("modes in %0d %0d %0d %0d, decoder modes %0d %0d %0d %0d", n_modes[0], n_modes[1],
             n_modes[2], n_modes[3], n_mode_seen[0], n_mode_seen[1], n_mode_seen[2], n_mode_seen[3]);
    check(n_checked > SECTORS * 20000, "enough nibbles compared");
    check(n_mismatch == 0, "decoder BUS equals coder BUS (after rate reduction)");
    check(n_crc_err == 1, "exactly the corrupted sector fails its CRC");
    check(n_crc_ok >= SECTORS - 2, "all other sectors pass their CRC");
    check(corrupt_done, "a byte was corrupted on the link");
    check(n_dummy > 0, "dummy packets sent");
    check(n_ch0 > 100 && n_ch1 > 100 && (n_ch0 - n_ch1) <= 1 && (n_ch1 - n_ch0) <= 1,
          "packets alternate over both channels");
    check(n_skew > 0, "decoder waited for the late channel");
    check(n_under == 0, "no decoder underflow");
    check(n_over == 0, "no FIFO overflow with 3-packet FIFOs");
    check(c_max_waiting <= 4'd2, "coder MAX fits a 3-packet FIFO");
    for (int m = 0; m < 4; m++) check(n_mode_seen[m] > 0, $sformatf("decoder ran in mode %0d", m));
    check(n_cfrp_lvds > 0 && n_cfrp_sdi > 0, "coder FRP27 from LVDS and from SDI input");
    check(c_aes_cfg_done, "AES receiver configured");
    check(n_dfrp >= 2, "decoder FRP27 once per frame");
    check(n_trs_ff > 0, "TRS words inserted");
    check(d_ref_present && (n_up > 0 || n_down > 0), "phase detector active");
    check(d_locked == 2'b11 && d_sync_err == 2'b00, "both streams locked");
    for (int i = 0; i < TI_N; i++) if (ti_err[i] > ti_worst) ti_worst = ti_err[i];
    $display("time interleaver: %0d data bytes in, %0d restored, %0d blocks, worst packet %0d burst errors, %0d of %0d codewords",
             ti_nin, ti_nout, ti_first, ti_worst, ti_ncw_ok, ti_ncw);
    check(ti_nout == 3 * TI_BLOCK && ti_first == 3 && ti_bad == 0, "de-interleaver restores the stream");
    check(ti_worst == (TI_BURST + TI_N - 1) / TI_N && ti_worst <= 23, "burst spread over the 748 packets");
    check(ti_ncw == 2 * TI_N && ti_ncw_ok == ti_ncw, "received packets are RS(187,141) codewords");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SECTORS * SECTOR_CYC + DEC_LAG + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
