// tb_dvcpro_framer: the framer rebuilds the codec's nibble stream along the
// decoder's DVCpro counters, which follow a codec timing model. A model of the
// read controller serves, for every sector the framer announces, that sector's
// reduced bytes (kept nibbles packed upper-first, for a per-sector mode), the
// CRC-CCITT of those bytes (computed here bit by bit) and zero padding to whole
// 182-byte packets, with the mode in the headers. Checked: every nibble on the
// rebuilt BUS (the coder's value where kept, fill 0 where dropped), two cycles
// after the codec's strobe; the sector numbers announced; the mode taken from
// the headers; crc_ok for every clean sector; crc_err and underflow for a
// sector whose bytes stop coming for a while; crc_err for a sector with one
// corrupted byte; skip of the padding; one FRP27 pulse per frame, at the
// chosen counter position.
module tb_dvcpro_framer;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int SECTORS = 24;
  localparam int STARVE_SECTOR = 5, CORRUPT_SECTOR = 14;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // codec timing and the decoder's counters
  logic bus_en, smp, ssp, frp18;
  logic [3:0] bus_unused;
  int mf, ms, mg, mb, mn;
  dvcpro_codec_model #(.START(20)) u_model (.clk, .rst_n, .bus_en, .bus(bus_unused), .smp, .ssp,
    .frp18, .frame(mf), .sector(ms), .group(mg), .block(mb), .nibble(mn));
  dv_pos_t pos;
  logic nib_valid, sec_start, frame_start;
  logic [3:0] nib_data;
  dvcpro_counters u_cnt (.clk, .rst_n, .bus_en, .bus(4'h0), .smp, .ssp, .frp18, .pos, .nib_valid,
    .nib_data, .sec_start, .frame_start);

  // framer
  logic req, ok, skip, new_sector, crc_init, crc_en, bus_valid, frp27, underflow, crc_ok, crc_err;
  logic [7:0] data, crc_data;
  logic [2:0] head_mode, mode;
  logic [3:0] sector;
  logic [15:0] crc;
  dvcpro_framer dut (.clk, .rst_n, .pos, .nib_valid, .sec_start, .req, .ok, .data, .head_mode,
    .skip, .new_sector, .sector, .crc_init, .crc_en, .crc_data, .crc, .bus_valid, .bus_out(),
    .frp27, .mode, .underflow, .crc_ok, .crc_err);
  crc16_ccitt u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .data(crc_data), .crc);
  logic [3:0] bus_out;
  assign bus_out = dut.bus_out;

  function automatic int mode_of(int abs_sector);
    return abs_sector % 4;
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

  // read controller model: the bytes of the announced sector
  logic [7:0] q [$];
  int q_mode, served, abs_served;
  bit starving;
  int n_new = 0, n_sector_err = 0;

  always_comb begin
    ok        = q.size() > 0 && !starving;
    data      = ok ? q[0] : 8'h00;
    head_mode = 3'(q_mode);
  end

  task automatic load_sector(int f, int s);
    logic [3:0] nibs [$];
    logic [15:0] c;
    int m, nbytes;
    m = mode_of(f * 12 + s);
    q.delete();
    for (int g = 0; g < 28; g++)
      for (int b = 0; b < 6; b++)
        for (int n = 0; n < 160; n++)
          if (keep_ref(m, g, b, n)) nibs.push_back(nib_ref(f, s, g, b, n));
    c = 16'h0000;
    for (int i = 0; i < nibs.size(); i += 2) begin
      logic [7:0] by;
      by = {nibs[i], nibs[i+1]};
      if (f * 12 + s == CORRUPT_SECTOR && i == 2000) q.push_back(by ^ 8'h10);
      else q.push_back(by);
      c = crc_bitwise(c, by);
    end
    q.push_back(c[15:8]);
    q.push_back(c[7:0]);
    nbytes = q.size();
    while (q.size() % 182 != 0) q.push_back(8'h00);
    q_mode = m;
  endtask

  // the sector the model is in, seen by the framer's counters one cycle later
  int cur_f, cur_s;
  always_ff @(posedge clk) if (ssp) begin cur_f <= mf; cur_s <= ms; end

  int n_skipped_bytes = 0;
  always @(posedge clk) if (rst_n) begin
    if (req && ok) void'(q.pop_front());
    if (skip) begin
      // drop the rest of the current packet
      while (q.size() % 182 != 0) begin void'(q.pop_front()); n_skipped_bytes++; end
    end
    if (new_sector) begin
      n_new++;
      if (int'(sector) != cur_s) n_sector_err++;
      load_sector(cur_f, cur_s);
    end
  end

  // expected BUS nibbles, two cycles after the model's strobe
  logic [3:0] exp_q [2];
  logic       expv_q [2];
  int         exps_q [2];
  bit         at0_q [2];
  always_ff @(posedge clk) begin
    exp_q[1] <= exp_q[0]; expv_q[1] <= expv_q[0]; exps_q[1] <= exps_q[0]; at0_q[1] <= at0_q[0];
    expv_q[0] <= bus_en;
    exps_q[0] <= mf * 12 + ms;
    at0_q[0]  <= bus_en && ms == 0 && mg == 0 && mb == 0 && mn == 0;
    exp_q[0]  <= keep_ref(mode_of(mf * 12 + ms), mg, mb, mn) ? nib_ref(mf, ms, mg, mb, mn) : 4'h0;
  end

  int n_checked = 0, n_mismatch = 0, n_ok = 0, n_err = 0, n_under = 0, n_frp = 0, n_frp_bad = 0;
  int n_mode_bad = 0, err_sectors [$];
  always @(posedge clk) if (rst_n) begin
    if (bus_valid != expv_q[1]) n_mismatch++;
    if (expv_q[1] && exps_q[1] < SECTORS && exps_q[1] != STARVE_SECTOR && exps_q[1] != CORRUPT_SECTOR) begin
      n_checked++;
      if (bus_out != exp_q[1]) begin
        n_mismatch++;
        if (n_mismatch < 5) $display("mismatch sector %0d got %h exp %h", exps_q[1], bus_out, exp_q[1]);
      end
    end
    // at every block start the framer must be using this sector's mode
    if (smp && mf * 12 + ms > 0 && mf * 12 + ms < SECTORS && int'(mode) != mode_of(mf * 12 + ms))
      n_mode_bad++;
    if (crc_ok) n_ok++;
    if (crc_err) begin n_err++; err_sectors.push_back(cur_f * 12 + cur_s - 1); end
    if (underflow) n_under++;
    if (frp27) begin n_frp++; if (!at0_q[1]) n_frp_bad++; end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    starving = 0;
    // run to the middle of the starved sector, hold the data back, go on
    wait (cur_f * 12 + cur_s == STARVE_SECTOR && u_model.idx > 12000);
    starving = 1;
    repeat (300) @(negedge clk);
    starving = 0;
    wait (cur_f * 12 + cur_s == SECTORS && u_model.idx > 100);
    repeat (10) @(negedge clk);
    $display("checked %0d nibbles, crc ok %0d err %0d, underflow %0d, frp27 %0d, new sectors %0d",
             n_checked, n_ok, n_err, n_under, n_frp, n_new);
    check(n_checked > 20 * 29000, "nibbles checked");
    check(n_mismatch == 0, $sformatf("%0d BUS mismatches", n_mismatch));
    check(n_mode_bad == 0, "mode follows the headers");
    check(n_sector_err == 0, "announced sector numbers");
    check(n_new == SECTORS + 1, "one sector start per sector");
    check(n_ok == SECTORS - 2, "clean sectors pass the CRC");
    check(n_err == 2 && err_sectors[0] == STARVE_SECTOR && err_sectors[1] == CORRUPT_SECTOR,
          "starved and corrupted sectors fail the CRC");
    check(n_under > 0, "underflow seen");
    check(n_skipped_bytes > 0, "padding skipped");
    check(n_frp == SECTORS / 12 + 1 && n_frp_bad == 0, "FRP27 once per frame at the chosen position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (SECTORS * 29664 * 3 + 200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
