// tb_packet_writer: sends three "sectors" of random byte counts (including one
// that fills its last packet exactly) through the packet writer and rebuilds
// the packets from its FIFO write port. Checked: every payload holds the next
// 182 bytes, the sector's last packet ends with the two CRC bytes (high first)
// and is committed short, packet addresses count from 0 in each sector with
// the sector and mode in the tag, and a packet that meets a full FIFO is
// dropped with an overflow pulse.
module tb_packet_writer;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic byte_valid = 0, sector_end = 0, full = 0;
  logic [7:0] byte_data = 0;
  logic [3:0] byte_sector = 0, end_sector = 0;
  logic [2:0] byte_mode = 0, end_mode = 0;
  logic [15:0] crc = 0;
  logic wr_en, wr_commit, overflow;
  logic [7:0] wr_data;
  pkt_tag_t wr_tag;
  packet_writer dut (.clk, .rst_n, .byte_valid, .byte_data, .byte_sector, .byte_mode,
    .sector_end, .end_sector, .end_mode, .crc, .wr_en, .wr_data, .wr_commit, .wr_tag, .full,
    .overflow);

  logic [7:0] cur [$];
  typedef struct { pkt_tag_t tag; logic [7:0] d [$]; } pkt_t;
  pkt_t pkts [$];
  int n_over = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) cur.push_back(wr_data);
    if (wr_commit) begin
      pkt_t p; p.tag = wr_tag; p.d = cur; pkts.push_back(p); cur = {};
    end
    if (overflow) n_over++;
  end

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic [7:0] st [$];
  task automatic send_sector(input int sec, input int mode, input int nbytes, input bit block_fifo);
    st = {};
    for (int i = 0; i < nbytes; i++) begin
      logic [7:0] v = 8'($urandom);
      st.push_back(v);
      byte_valid = 1; byte_data = v; byte_sector = 4'(sec); byte_mode = 3'(mode);
      full = block_fifo && (i / 182) == 1;   // FIFO full while packet 1 opens
      @(negedge clk);
      byte_valid = 0; full = 0;
      @(negedge clk);
    end
    crc = 16'($urandom);
    sector_end = 1; end_sector = 4'(sec); end_mode = 3'(mode); @(negedge clk);
    sector_end = 0; crc = 16'hDEAD;     // value changes after sector_end, as the CRC clears
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [15:0] crc_used;
    int sizes [3] = '{1000, 182 * 3, 400};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      int npk, base;
      base = pkts.size();
      st = {};
      fork
        begin
          send_sector(k + 3, k, sizes[k], k == 2);
        end
        begin
          // capture the CRC value presented with sector_end
          @(posedge sector_end); @(posedge clk); crc_used = crc;
        end
      join
      st.push_back(crc_used[15:8]);
      st.push_back(crc_used[7:0]);
      npk = (sizes[k] + 2 + 181) / 182;
      check(pkts.size() - base == npk - (k == 2 ? 1 : 0), $sformatf("packet count sector %0d", k));
      for (int p = 0, a = 0; a < npk; a++) begin
        int lo, hi;
        lo = a * 182;
        hi = (lo + 182 < st.size()) ? lo + 182 : st.size();
        if (k == 2 && a == 1) continue;          // dropped packet
        check(pkts[base + p].tag.addr == 7'(a) && pkts[base + p].tag.sector == 5'(k + 3) &&
              pkts[base + p].tag.mode == 3'(k), $sformatf("tag s%0d p%0d", k, a));
        check(pkts[base + p].d.size() == hi - lo, $sformatf("length s%0d p%0d %0d vs %0d", k, a, pkts[base + p].d.size(), hi - lo));
        for (int i = lo; i < hi; i++)
          check(pkts[base + p].d[i - lo] == st[i], $sformatf("byte %0d", i));
        p++;
      end
    end
    check(n_over == 1, "one overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
