// tb_dvcpro_counters: runs a codec timing model (one nibble per cycle) over
// 13 sectors, so that the sector count wraps, and compares the counters' sector,
// group, block and nibble index, registered data and strobes with the model's
// own position, one cycle later.
module tb_dvcpro_counters;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic bus_en, smp, ssp, frp18;
  logic [3:0] bus;
  int f, s, g, b, n;
  dvcpro_codec_model #(.START(4), .NIB_PERIOD(1)) u_m (.clk, .rst_n, .bus_en, .bus, .smp, .ssp,
    .frp18, .frame(f), .sector(s), .group(g), .block(b), .nibble(n));
  dv_pos_t pos;
  logic nib_valid, sec_start, frame_start;
  logic [3:0] nib_data;
  dvcpro_counters dut (.clk, .rst_n, .bus_en, .bus, .smp, .ssp, .frp18, .pos, .nib_valid,
                       .nib_data, .sec_start, .frame_start);
  int ps, pg, pb, pn; logic pv, pssp, pfrp; logic [3:0] pd;
  int n_wrap = 0;
  always @(posedge clk) begin
    if (rst_n && pv) begin
      checks++;
      if (!(nib_valid && pos.sector == 4'(ps) && nib_data == pd && sec_start == pssp &&
            frame_start == pfrp &&
            (pn < 0 ? pos.nibble == NIB_IDLE || pos.nibble == 8'd176
                    : (pos.group == 5'(pg) && pos.block == 3'(pb) && pos.nibble == 8'(pn))))) begin
        failures++;
        if (failures < 10) $display("FAIL s%0d g%0d b%0d n%0d got %p", ps, pg, pb, pn, pos);
      end
      if (pfrp) n_wrap++;
    end
    pv <= bus_en; ps <= s; pg <= g; pb <= b; pn <= n; pd <= bus; pssp <= bus_en & ssp;
    pfrp <= bus_en & frp18;
  end
  initial begin
    pv = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (13 * 29664 + 100) @(posedge clk);
    checks++; if (n_wrap != 2) begin failures++; $display("FAIL frame starts %0d", n_wrap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (14 * 29664) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
