// tb_dvcpro_coder: the coder half at its default parameters. A codec timing
// model drives BUS/SMP/SSP/FRP18 for 13 sectors, the data rate option changing
// every sector (0, 1, 2, 3, 0, ...). The two packet outputs are parsed here and
// each sector's payload is rebuilt from its packets and compared with bytes
// worked out independently from the model's nibbles: the kept nibbles packed
// upper-first, the CRC-CCITT (computed bit by bit here), then zero padding.
// Also checked: 188-byte packets with sync byte and reserved bytes, mode and
// sector in the headers, consecutive packet addresses, dummy packets, packets
// alternating between the two outputs, one packet every PKT_DIV (1122) cycles,
// no FIFO overflow, and on the video side the MAIN bus copy of the LVDS input,
// FRP27 from the TRS F bit and the AES configuration.
module tb_dvcpro_coder;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int SECTORS = 13;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic bus_en, smp, ssp, frp18;
  logic [3:0] bus;
  int mf, ms, mg, mb, mn;
  dvcpro_codec_model #(.START(20)) u_model (.clk, .rst_n, .bus_en, .bus, .smp, .ssp, .frp18,
    .frame(mf), .sector(ms), .group(mg), .block(mb), .nibble(mn));

  function automatic int mode_of(int abs_sector);
    return abs_sector % 4;
  endfunction
  logic [2:0] mode;
  initial mode = 3'd0;
  always_ff @(posedge clk) if (bus_en && ssp) mode <= 3'(mode_of(mf * 12 + ms));

  // video: TRS every 64 bytes, F toggling every 40 TRS
  int vcnt = 0, trs_n = 0;
  logic [7:0] vbyte;
  always_ff @(posedge clk) begin
    vcnt <= (vcnt == 63) ? 0 : vcnt + 1;
    if (vcnt == 63) trs_n <= trs_n + 1;
  end
  always_comb
    case (vcnt)
      0: vbyte = 8'hFF;
      1, 2: vbyte = 8'h00;
      3: vbyte = {1'b1, 1'(((trs_n / 40) % 2)), 6'b010101};
      default: vbyte = 8'h10 + 8'(vcnt);
    endcase

  logic main_valid, frp27, aes_cs_n, aes_sclk, aes_data, aes_done, dummy_pkt, fifo_overflow;
  logic [7:0] main_data;
  logic [1:0] ch_valid, ch_sop;
  logic [7:0] ch_data [2];
  logic [3:0] pkts_waiting, max_waiting;
  dvcpro_coder dut (.clk, .rst_n, .mode, .sel_sdi(1'b0), .lvds_valid(1'b1), .lvds_data(vbyte),
    .sdi_valid(1'b0), .sdi_data(10'h000), .main_valid, .main_data, .frp27,
    .bus_en, .bus, .smp, .ssp, .frp18, .aes_cs_n, .aes_sclk, .aes_data, .aes_cfg_done(aes_done),
    .ch_valid, .ch_sop, .ch_data, .dummy_pkt, .fifo_overflow, .pkts_waiting, .max_waiting);

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
  function automatic logic [15:0] crc_bitwise(logic [15:0] c, logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      bit fb;
      fb = c[15] ^ d[i];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // ---- packet parser over both outputs ----
  logic [7:0] pk [2][$];
  int last_sop = -1, n_pkts = 0, n_dummy = 0, n_period_bad = 0, n_hdr_bad = 0, n_alt_bad = 0;
  int last_chan = -1, cyc = 0, n_sector_bad = 0, n_sectors_checked = 0;
  int cur_sec = -1, cur_abs = -1, cur_mode = 0, next_addr = 0;
  logic [7:0] sec_bytes [$];
  int n_pk_ch [2];
  initial begin n_pk_ch[0] = 0; n_pk_ch[1] = 0; end

  task automatic close_sector();
    logic [7:0] e [$];
    logic [3:0] nibs [$];
    logic [15:0] c;
    int f, s, bad;
    f = cur_abs / 12; s = cur_abs % 12;
    for (int g = 0; g < 28; g++)
      for (int b = 0; b < 6; b++)
        for (int n = 0; n < 160; n++)
          if (keep_ref(cur_mode, g, b, n)) nibs.push_back(nib_ref(f, s, g, b, n));
    c = 16'h0000;
    for (int i = 0; i < nibs.size(); i += 2) begin
      e.push_back({nibs[i], nibs[i+1]});
      c = crc_bitwise(c, {nibs[i], nibs[i+1]});
    end
    e.push_back(c[15:8]); e.push_back(c[7:0]);
    while (e.size() % 182 != 0) e.push_back(8'h00);
    bad = (e.size() != sec_bytes.size()) || cur_mode != mode_of(cur_abs);
    if (!bad) for (int i = 0; i < e.size(); i++) if (e[i] != sec_bytes[i]) bad++;
    if (bad) begin
      n_sector_bad++;
      $display("sector %0d (mode %0d): %0d bytes, expected %0d", cur_abs, cur_mode,
               sec_bytes.size(), e.size());
    end
    n_sectors_checked++;
    sec_bytes.delete();
  endtask

  task automatic take_packet(int ch);
    logic [7:0] p [$];
    p = pk[ch];
    n_pkts++;
    n_pk_ch[ch]++;
    if (p.size() != 188 || p[0] != SYNC_BYTE || p[1] != 0 || p[2] != 0 || p[3] != 0) begin
      n_hdr_bad++; return;
    end
    if (p[4][7]) begin n_dummy++; return; end
    if (int'(p[5][7:3]) != cur_sec) begin
      if (cur_abs >= 0) close_sector();
      cur_sec = p[5][7:3];
      cur_abs = (cur_abs < 0) ? cur_sec : cur_abs + 1;
      if (cur_abs % 12 != cur_sec) n_hdr_bad++;
      cur_mode = p[5][2:0];
      next_addr = 0;
    end
    if (int'(p[4][6:0]) != next_addr || int'(p[5][2:0]) != cur_mode) n_hdr_bad++;
    next_addr++;
    for (int i = 6; i < 188; i++) sec_bytes.push_back(p[i]);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int ch = 0; ch < 2; ch++) if (ch_valid[ch]) begin
      if (ch_sop[ch]) begin
        if (pk[ch].size() > 0) take_packet(ch);
        pk[ch].delete();
        if (last_sop >= 0 && cyc - last_sop != 1122) n_period_bad++;
        if (last_chan == ch) n_alt_bad++;
        last_sop = cyc; last_chan = ch;
      end
      pk[ch].push_back(ch_data[ch]);
      if (pk[ch].size() == 188) begin take_packet(ch); pk[ch].delete(); end
    end
  end

  // ---- video side ----
  logic [7:0] vq [2];
  int n_main_bad = 0, n_frp_rise = 0;
  logic frp_q = 0;
  always @(posedge clk) if (rst_n) begin
    vq[1] <= vq[0]; vq[0] <= vbyte;
    if (main_valid && main_data != vq[0]) n_main_bad++;
    frp_q <= frp27;
    if (frp27 && !frp_q) n_frp_rise++;
  end

  int n_over = 0;
  always @(posedge clk) if (rst_n && fifo_overflow) n_over++;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (u_model.frame * 12 + u_model.sector == SECTORS + 1);
    repeat (5000) @(negedge clk);
    $display("packets %0d (ch0 %0d, ch1 %0d), dummy %0d, sectors checked %0d, max waiting %0d",
             n_pkts, n_pk_ch[0], n_pk_ch[1], n_dummy, n_sectors_checked, max_waiting);
    check(n_sectors_checked >= SECTORS - 1, "sectors rebuilt from packets");
    check(n_sector_bad == 0, $sformatf("%0d sectors with wrong payload", n_sector_bad));
    check(n_hdr_bad == 0, $sformatf("%0d bad headers", n_hdr_bad));
    check(n_period_bad == 0, "one packet every 1122 cycles");
    check(n_alt_bad == 0 && n_pk_ch[0] > 0 && n_pk_ch[1] > 0, "packets alternate between outputs");
    check(n_dummy > 0, "dummy packets when the FIFO is empty");
    check(n_over == 0 && max_waiting <= 4'd3, "no FIFO overflow");
    check(n_main_bad == 0, "MAIN carries the LVDS video");
    check(n_frp_rise > 0, "FRP27 from the video's F bit");
    check(aes_done, "AES receiver configured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((SECTORS + 2) * 29664 * 3 + 100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
