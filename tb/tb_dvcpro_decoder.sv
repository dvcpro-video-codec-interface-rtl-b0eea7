// tb_dvcpro_decoder: the decoder half at its default parameters, fed by
// packet streams built here. A first codec timing model stands for the coder's
// codec: the nibbles the data rate option keeps (changing every sector) are
// packed into bytes, each sector closed with its CRC-CCITT (computed bit by
// bit) and zero padding, and cut into 182-byte payloads behind 6-byte headers.
// One packet, or a dummy packet when none is ready, leaves every 1122 cycles,
// alternately on two links; link 1 is 1300 cycles slower than link 0. A second
// codec model, 6500 cycles behind the first, clocks the rebuilt data out of the
// decoder. Checked: every nibble on BUS (coder value where kept, fill where
// dropped) two cycles after its strobe; crc_ok for every sector and crc_err for
// a sector with one byte damaged on link 1; the mode taken from the headers;
// both links locked, dummies seen, no FIFO overflow or underflow; waiting for
// the late link; FRP27 once per frame; EAV/SAV words on the TRS output and a
// valid SDI stream; reference present and phase detector activity.
module tb_dvcpro_decoder;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int SECTORS = 14, LAG = 6500, SKEW = 1300, CORRUPT_SECTOR = 9;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int mode_of(int abs_sector);
    return (abs_sector / 3) % 4;
  endfunction
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

  // ---- transmit side built in the testbench ----
  logic a_en, a_smp, a_ssp, a_frp18;
  logic [3:0] a_bus;
  int af, as, ag, ab, an;
  dvcpro_codec_model #(.START(20)) u_src (.clk, .rst_n, .bus_en(a_en), .bus(a_bus), .smp(a_smp),
    .ssp(a_ssp), .frp18(a_frp18), .frame(af), .sector(as), .group(ag), .block(ab), .nibble(an));

  typedef struct { logic [7:0] b [188]; } pkt_t;
  pkt_t ready [$];
  logic [7:0] pend [$];
  logic [3:0] hi;
  bit have_hi;
  logic [15:0] crc;
  int t_abs = -1, t_addr = 0;

  task automatic make_packet(bit last);
    pkt_t p;
    p.b[0] = SYNC_BYTE; p.b[1] = 0; p.b[2] = 0; p.b[3] = 0;
    p.b[4] = {1'b0, 7'(t_addr)};
    p.b[5] = {5'(t_abs % 12), 3'(mode_of(t_abs))};
    for (int i = 0; i < 182; i++) p.b[6 + i] = (pend.size() > 0) ? pend.pop_front() : 8'h00;
    ready.push_back(p);
    t_addr++;
  endtask

  always @(posedge clk) if (rst_n && a_en) begin
    if (a_ssp) begin
      if (t_abs >= 0) begin
        pend.push_back(crc[15:8]); pend.push_back(crc[7:0]);
        while (pend.size() > 0) make_packet(1);
      end
      t_abs = af * 12 + as; t_addr = 0; crc = 0; have_hi = 0;
    end
    if (t_abs < SECTORS && an >= 0 && keep_ref(mode_of(t_abs), ag, ab, an)) begin
      logic [3:0] v;
      v = nib_ref(af, as, ag, ab, an);
      if (!have_hi) begin hi = v; have_hi = 1; end
      else begin
        pend.push_back({hi, v}); crc = crc_bitwise(crc, {hi, v}); have_hi = 0;
        if (pend.size() == 182) make_packet(0);
      end
    end
  end

  // packet clock and the two links (delay lines of whole bytes)
  typedef struct { logic v; logic [7:0] d; int t; } lb_t;
  lb_t link [2][$];
  int cyc = 0, tick_cnt = 0, chan = 1, n_sent = 0, n_sent_dummy = 0, t_corrupt_pkt = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    tick_cnt = (tick_cnt == 1121) ? 0 : tick_cnt + 1;
    if (tick_cnt == 0) begin
      pkt_t p;
      chan = 1 - chan;
      if (ready.size() > 0) p = ready.pop_front();
      else begin
        p.b[0] = SYNC_BYTE; p.b[1] = 0; p.b[2] = 0; p.b[3] = 0; p.b[4] = 8'h80; p.b[5] = 0;
        for (int i = 6; i < 188; i++) p.b[i] = 0;
        n_sent_dummy++;
      end
      if (chan == 1 && !p.b[4][7] && p.b[5][7:3] == 5'(CORRUPT_SECTOR) && t_corrupt_pkt < 0) begin
        p.b[100] = p.b[100] ^ 8'h21; t_corrupt_pkt = n_sent;
      end
      n_sent++;
      for (int i = 0; i < 188; i++) begin
        lb_t e;
        e.v = 1; e.d = p.b[i]; e.t = cyc + 1 + i + (chan == 1 ? SKEW : 0) + 100;
        link[chan].push_back(e);
      end
    end
  end
  logic rx_valid [2];
  logic [7:0] rx_data [2];
  always @(negedge clk)
    for (int c = 0; c < 2; c++) begin
      if (link[c].size() > 0 && link[c][0].t <= cyc) begin
        lb_t e;
        e = link[c].pop_front();
        rx_valid[c] = 1; rx_data[c] = e.d;
      end else begin
        rx_valid[c] = 0; rx_data[c] = 8'h00;
      end
    end

  // ---- decoder and its codec model ----
  logic d_en, d_smp, d_ssp, d_frp18;
  logic [3:0] d_unused;
  int df, ds, dg, db, dn;
  dvcpro_codec_model #(.START(20 + LAG)) u_dst (.clk, .rst_n, .bus_en(d_en), .bus(d_unused),
    .smp(d_smp), .ssp(d_ssp), .frp18(d_frp18), .frame(df), .sector(ds), .group(dg), .block(db),
    .nibble(dn));

  logic bus_valid, frp27, sdi_valid, ref_present, pll_up, pll_down, crc_ok, crc_err, underflow;
  logic stale, skew_wait;
  logic [3:0] bus_out;
  logic [9:0] trs_video, sdi_data;
  logic [2:0] mode;
  logic [1:0] overflow, sync_err, dummy_seen, locked;
  dvcpro_decoder dut (.clk, .rst_n, .rx_valid, .rx_data, .bus_en(d_en), .smp(d_smp), .ssp(d_ssp),
    .frp18(d_frp18), .bus_valid, .bus_out, .frp27, .main_valid(1'b1), .main_data(8'h80),
    .trs_video, .sdi_valid, .sdi_data, .ref_present, .pll_up, .pll_down, .mode, .crc_ok,
    .crc_err, .underflow, .overflow, .sync_err, .dummy_seen, .locked, .stale, .skew_wait);

  // ---- checks ----
  logic [3:0] exp_q [2];
  logic       expv_q [2];
  int         exps_q [2];
  always_ff @(posedge clk) begin
    exp_q[1] <= exp_q[0]; expv_q[1] <= expv_q[0]; exps_q[1] <= exps_q[0];
    expv_q[0] <= d_en;
    exps_q[0] <= df * 12 + ds;
    exp_q[0]  <= keep_ref(mode_of(df * 12 + ds), dg, db, dn) ? nib_ref(df, ds, dg, db, dn) : 4'h0;
  end
  int n_checked = 0, n_mis = 0, n_ok = 0, n_err = 0, n_under = 0, n_over = 0, n_dummy = 0;
  int n_skew = 0, n_frp = 0, n_ff = 0, n_sdi = 0, n_up = 0, n_mode_bad = 0, n_serr = 0;
  always @(posedge clk) if (rst_n) begin
    if (cyc > 4 && expv_q[1] != bus_valid) begin n_mis++; $display("bus_valid misaligned at %0t", $time); end
    if (expv_q[1] && exps_q[1] < SECTORS && exps_q[1] != CORRUPT_SECTOR) begin
      n_checked++;
      if (bus_out != exp_q[1]) begin
        n_mis++;
        if (n_mis < 5) $display("BUS mismatch sector %0d got %h exp %h", exps_q[1], bus_out, exp_q[1]);
      end
    end
    if (d_smp && df * 12 + ds < SECTORS && int'(mode) != mode_of(df * 12 + ds)) n_mode_bad++;
    if (crc_ok) n_ok++;
    if (crc_err) n_err++;
    if (underflow && df * 12 + ds < SECTORS) n_under++;
    if (overflow != 0) n_over++;
    if (dummy_seen != 0) n_dummy++;
    if (sync_err != 0) n_serr++;
    if (skew_wait) n_skew++;
    if (frp27) n_frp++;
    if (trs_video == 10'h3FF) n_ff++;
    if (sdi_valid) n_sdi++;
    if (pll_up) n_up++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (df * 12 + ds == SECTORS && dn > 10);
    repeat (10) @(negedge clk);
    $display("checked %0d nibbles, crc ok %0d err %0d, sent %0d (dummy %0d), skew waits %0d",
             n_checked, n_ok, n_err, n_sent, n_sent_dummy, n_skew);
    check(n_checked > (SECTORS - 2) * 29000, "nibbles checked");
    check(n_mis == 0, $sformatf("%0d BUS mismatches", n_mis));
    check(t_corrupt_pkt >= 0 && n_err == 1, "the damaged sector fails its CRC");
    check(n_ok == SECTORS - 1, "all other sectors pass their CRC");
    check(n_mode_bad == 0, "mode from the headers");
    check(locked == 2'b11 && n_serr == 0, "both links locked");
    check(n_dummy > 0, "dummy packets recognised");
    check(n_over == 0 && n_under == 0, "no FIFO overflow or underflow");
    check(n_skew > 0, "waited for the late link");
    check(n_frp == 2, "FRP27 once per frame");
    check(n_ff > 1000 && n_sdi > 1000, "TRS words and SDI output");
    check(ref_present && n_up > 0, "packet clock reference and phase detector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((SECTORS + 1) * 29664 * 3 + LAG + 100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
