// tb_rate_reducer: drives the reducer with sector/group/block/nibble positions
// from a codec timing model, one sector in each of the four data rate options,
// and compares its byte stream with an independently computed one (kept
// nibbles paired high-first) and the per-sector byte counts with the figures
// 13440, 12000, 11280 and 10395 (80 bytes x 168/150/141 blocks, 77 x 135).
module tb_rate_reducer;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic bus_en, smp, ssp, frp18;
  logic [3:0] bus;
  int f, s, g, b, n;
  dvcpro_codec_model #(.START(4), .NIB_PERIOD(1)) u_m (.clk, .rst_n, .bus_en, .bus, .smp, .ssp,
    .frp18, .frame(f), .sector(s), .group(g), .block(b), .nibble(n));

  logic [2:0] mode;
  dv_pos_t pos;
  logic nib_valid, sec_start;
  logic [3:0] nib_data;
  always_comb mode = 3'(s % 4);
  always_ff @(posedge clk) begin
    nib_valid <= bus_en;
    nib_data  <= bus;
    sec_start <= bus_en & ssp;
    pos <= '{sector: 4'(s), group: 5'(g), block: 3'(b), nibble: (n < 0) ? 8'd176 : 8'(n)};
  end
  logic byte_valid, sector_end;
  logic [7:0] byte_data;
  logic [3:0] byte_sector, end_sector;
  logic [2:0] byte_mode, end_mode;
  logic [2:0] mode_q;
  always_ff @(posedge clk) mode_q <= mode;
  rate_reducer dut (.clk, .rst_n, .mode(mode_q), .pos, .nib_valid, .nib_data, .sec_start,
    .byte_valid, .byte_data, .byte_sector, .byte_mode, .sector_end, .end_sector, .end_mode);

  function automatic bit keep_ref(int m, int gg, int bb, int nn);
    if (nn < 0 || nn >= 160) return 0;
    case (m)
      0: return 1;
      1: return gg == 0 || bb < 5 || (gg % 3) == 1;
      2: return gg == 0 || bb < 5;
      default: return gg != 0 && bb < 5 && nn >= 6;
    endcase
  endfunction

  logic [7:0] expq [$];
  logic [3:0] hi; bit have = 0;
  int cnt = 0, nsec = 0;
  int expected_count [4] = '{13440, 12000, 11280, 10395};
  always @(posedge clk) if (rst_n) begin
    if (bus_en && ssp) have = 0;
    if (bus_en && keep_ref(s % 4, g, b, n)) begin
      if (!have) begin hi = bus; have = 1; end
      else begin expq.push_back({hi, bus}); have = 0; end
    end
    if (byte_valid) begin
      checks++;
      cnt++;
      if (expq.size() == 0 || byte_data != expq.pop_front() || byte_mode != 3'(byte_sector % 4)) begin
        failures++;
        if (failures < 10) $display("FAIL byte %h", byte_data);
      end
    end
    if (sector_end) begin
      checks++;
      if (cnt != expected_count[end_sector % 4] || end_mode != 3'(end_sector % 4)) begin
        failures++;
        $display("FAIL sector %0d: %0d bytes", end_sector, cnt);
      end
      cnt = 0;
      nsec++;
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5 * 29664 + 50) @(posedge clk);
    checks++; if (nsec != 5) begin failures++; $display("FAIL sectors %0d", nsec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6 * 29664) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
