// tb_packet_reader: a queue-model FIFO offers packets to the reader; ticks come
// every 300 cycles. Checked for every output packet: 188 bytes, sync 0x47, three
// zero bytes, validity flag and packet address, sector address and mode, the
// 182 payload bytes (a dummy packet when the FIFO is empty, zero payload), the
// release of the FIFO slot with the last byte, and channel alternation.
module tb_packet_reader;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick = 0, rd_avail, rd_release, tx_valid, tx_sop, tx_chan, dummy;
  pkt_tag_t rd_tag;
  logic [7:0] rd_off, rd_data, tx_data;
  logic [2:0] mode = 3'd2;

  typedef struct { pkt_tag_t tag; logic [7:0] d [182]; } pkt_t;
  pkt_t q [$];
  always_comb begin
    rd_avail = q.size() > 0;
    rd_tag   = rd_avail ? q[0].tag : '0;
    rd_data  = (rd_avail && rd_off < 182) ? q[0].d[rd_off] : 8'h00;
  end

  packet_reader dut (.clk, .rst_n, .tick, .mode, .rd_avail, .rd_tag, .rd_off, .rd_data,
    .rd_release, .tx_valid, .tx_sop, .tx_data, .tx_chan, .dummy);

  pkt_t sent [$];
  logic [7:0] rx [$];
  bit rx_chan [$];
  int n_dummy = 0, n_rel = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_release) begin sent.push_back(q.pop_front()); n_rel++; end
    if (tx_valid) begin rx.push_back(tx_data); if (tx_sop) rx_chan.push_back(tx_chan); end
    if (dummy) n_dummy++;
  end

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int np;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      pkt_t p;
      p.tag = '{mode: 3'(k), sector: 5'(k + 7), addr: 7'(k * 20 + 3)};
      for (int i = 0; i < 182; i++) p.d[i] = 8'($urandom);
      q.push_back(p);
    end
    // 6 ticks: 4 real packets, then 2 dummies
    for (int t = 0; t < 6; t++) begin
      tick = 1; @(negedge clk); tick = 0;
      repeat (299) @(negedge clk);
    end
    np = 0;
    check(rx.size() == 6 * 188, "6 packets of 188 bytes");
    for (int t = 0; t < 6; t++) begin
      int b;
      bit dm;
      b = t * 188;
      dm = t >= 4;
      check(rx[b] == 8'h47 && rx[b+1] == 0 && rx[b+2] == 0 && rx[b+3] == 0, "sync and reserved");
      if (!dm) begin
        check(rx[b+4] == {1'b0, sent[t].tag.addr}, "valid flag and address");
        check(rx[b+5] == {sent[t].tag.sector, sent[t].tag.mode}, "sector and mode");
        for (int i = 0; i < 182; i++) check(rx[b+6+i] == sent[t].d[i], "payload");
      end else begin
        check(rx[b+4][7] == 1'b1, "dummy flag");
        check(rx[b+5][2:0] == mode, "dummy mode");
        for (int i = 0; i < 182; i++) check(rx[b+6+i] == 8'h00, "dummy payload");
      end
      if (t > 0) check(rx_chan[t] != rx_chan[t-1], "channels alternate");
    end
    check(n_dummy == 2 && n_rel == 4, "2 dummies, 4 releases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
