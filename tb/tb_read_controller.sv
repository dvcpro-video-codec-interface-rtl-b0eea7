// tb_read_controller: two queue models of the decoder's packet FIFOs receive
// the packets of five sectors (11, 0, 1, 2, 3: the sector address wraps after
// 11), alternately, with channel 1 arriving 900 cycles later than channel 0.
// Channel 0 also receives a repeated packet and a packet of an unrelated
// sector. A model of the framer announces each sector, pulls every payload
// byte, reads only the start of each sector's last packet and then skips the
// rest, as the framer does after the CRC. Checked: the byte stream pulled is
// exactly the packets in (sector, address) order; the two unusable packets are
// discarded; the read side waits for the late channel (skew_wait) and takes
// data only when it is there; both FIFOs end empty.
module tb_read_controller;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic rd_avail [2], rd_release [2];
  pkt_tag_t rd_tag [2];
  logic [7:0] rd_off [2], rd_data [2];
  logic req = 0, ok, skip = 0, new_sector = 0, stale, skew_wait;
  logic [7:0] data;
  logic [2:0] head_mode;
  logic [3:0] sector = 0;
  read_controller dut (.clk, .rst_n, .rd_avail, .rd_tag, .rd_off, .rd_data, .rd_release,
    .req, .ok, .data, .head_mode, .skip, .new_sector, .sector, .stale, .skew_wait);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  typedef struct { pkt_tag_t tag; logic [7:0] d [182]; int t; } pkt_t;
  pkt_t fifo [2][$];
  pkt_t all [$];            // the packets in order
  int   npk [5];
  localparam int SEQ [5] = '{11, 0, 1, 2, 3};

  always_comb
    for (int i = 0; i < 2; i++) begin
      rd_avail[i] = fifo[i].size() > 0 && fifo[i][0].t <= cyc;
      rd_tag[i]   = rd_avail[i] ? fifo[i][0].tag : '0;
      rd_data[i]  = (rd_avail[i] && rd_off[i] < 182) ? fifo[i][0].d[rd_off[i]] : 8'h00;
    end

  int n_stale = 0, n_skew = 0, n_rel = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (rd_release[i]) begin void'(fifo[i].pop_front()); n_rel++; end
    if (stale) n_stale++;
    if (skew_wait) n_skew++;
  end

  initial begin
    int j, nbad, nwait;
    j = 0;
    for (int s = 0; s < 5; s++) begin
      npk[s] = 3 + s % 3;
      for (int a = 0; a < npk[s]; a++) begin
        pkt_t p;
        p.tag = '{mode: 3'(s % 4), sector: 5'(SEQ[s]), addr: 7'(a)};
        for (int i = 0; i < 182; i++) p.d[i] = 8'($urandom);
        p.t = 100 + j * 400 + (j % 2) * 900;
        all.push_back(p);
        fifo[j % 2].push_back(p);
        if (s == 1 && a == 0) begin            // a repeated packet: unusable
          p.d[0] = ~p.d[0]; p.t = p.t + 1; fifo[0].push_back(p); j++;
        end
        if (s == 3 && a == 1) begin            // a packet of an unrelated sector
          p.tag.sector = 5'd7; p.t = p.t + 1; fifo[0].push_back(p); j++;
        end
        j++;
      end
    end
    nbad = 0; nwait = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    j = 0;
    for (int s = 0; s < 5; s++) begin
      new_sector = 1; sector = 4'(SEQ[s]); skip = (s > 0);
      @(negedge clk);
      new_sector = 0; skip = 0;
      for (int a = 0; a < npk[s]; a++) begin
        int nb;
        nb = (a == npk[s] - 1) ? 50 : 182;
        for (int b = 0; b < nb; b++) begin
          req = 1;
          @(posedge clk);
          while (!ok) begin nwait++; @(posedge clk); end
          if (data != all[j].d[b] || head_mode != all[j].tag.mode) nbad++;
          @(negedge clk);
        end
        req = 0;
        j++;
      end
    end
    // skip the rest of the final packet
    skip = 1; @(negedge clk); skip = 0;
    repeat (3000) @(negedge clk);
    check(nbad == 0, $sformatf("%0d wrong bytes", nbad));
    check(n_stale == 2, $sformatf("%0d packets discarded", n_stale));
    check(n_skew > 0 && nwait > 0, "waited for the late channel");
    check(fifo[0].size() == 0 && fifo[1].size() == 0, "FIFOs emptied");
    check(n_rel == all.size() + 2, "every packet released once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
