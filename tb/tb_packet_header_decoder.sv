// tb_packet_header_decoder: a stream of 188-byte packets with random headers
// (about one in five a dummy packet) and idle gaps between bytes goes into the
// decoder; a queue in the testbench stands for the packet FIFO. Payload and
// header bytes never equal the sync byte, so that lock is found only on real
// packet starts. Checked: every valid packet is stored whole with its sector,
// address and mode, in order; dummy packets are not stored; a packet arriving
// while the FIFO is full is dropped with an overflow pulse; a damaged sync byte
// gives sync_err, the packet is lost and lock is regained at the next packet.
module tb_packet_header_decoder;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid = 0, full = 0;
  logic [7:0] rx_data = 0, wr_data;
  logic wr_en, wr_commit, wr_abort, locked, pkt_start, sync_err, overflow, dummy_seen;
  pkt_tag_t wr_tag;
  packet_header_decoder dut (.clk, .rst_n, .rx_valid, .rx_data, .wr_en, .wr_data, .wr_commit,
    .wr_abort, .wr_tag, .full, .locked, .pkt_start, .sync_err, .overflow, .dummy_seen);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  typedef struct { pkt_tag_t tag; logic [7:0] d [182]; } pkt_t;
  pkt_t expq [$];
  logic [7:0] cur [$];
  int n_stored = 0, n_bad = 0, n_over = 0, n_serr = 0, n_dummy = 0, n_start = 0;

  always @(posedge clk) if (rst_n) begin
    if (wr_en) cur.push_back(wr_data);
    if (wr_abort) cur.delete();
    if (wr_commit) begin
      pkt_t e;
      n_stored++;
      if (expq.size() == 0) n_bad++;
      else begin
        e = expq.pop_front();
        if (wr_tag != e.tag || cur.size() != 182) n_bad++;
        else for (int i = 0; i < 182; i++) if (cur[i] != e.d[i]) n_bad++;
      end
      cur.delete();
    end
    if (overflow) n_over++;
    if (sync_err) n_serr++;
    if (dummy_seen) n_dummy++;
    if (pkt_start) n_start++;
  end

  function automatic logic [7:0] rnd_byte();
    logic [7:0] b;
    do b = 8'($urandom); while (b == SYNC_BYTE);
    return b;
  endfunction

  task automatic send(input logic [7:0] b);
    while ($urandom % 3 == 0) begin rx_valid = 0; rx_data = 8'h47; @(negedge clk); end
    rx_valid = 1; rx_data = b; @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    int exp_dummy, exp_over, exp_stored;
    exp_dummy = 0; exp_over = 0; exp_stored = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // some noise before the first packet
    repeat (50) send(rnd_byte());
    for (int k = 0; k < 300; k++) begin
      pkt_t p;
      bit dm, corrupt, fl;
      logic [7:0] h4, h5;
      dm      = ($urandom % 5) == 0;
      corrupt = k == 100 || k == 200;
      fl      = (k % 37) == 5;
      do begin
        p.tag = '{mode: 3'($urandom % 4), sector: 5'($urandom % 12), addr: 7'($urandom % 80)};
        h4 = {dm, p.tag.addr}; h5 = {p.tag.sector, p.tag.mode};
      end while (h4 == SYNC_BYTE || h5 == SYNC_BYTE);
      for (int i = 0; i < 182; i++) p.d[i] = rnd_byte();
      full = fl;
      if (!corrupt && !dm && !fl) begin expq.push_back(p); exp_stored++; end
      if (!corrupt && dm) exp_dummy++;
      if (!corrupt && !dm && fl) exp_over++;
      send(corrupt ? 8'h46 : SYNC_BYTE);
      send(8'h00); send(8'h00); send(8'h00); send(h4); send(h5);
      for (int i = 0; i < 182; i++) send(p.d[i]);
    end
    repeat (5) @(negedge clk);
    check(n_bad == 0, $sformatf("%0d stored packets wrong", n_bad));
    check(n_stored == exp_stored && expq.size() == 0, $sformatf("%0d of %0d stored", n_stored, exp_stored));
    check(n_dummy == exp_dummy, "dummy packets seen and not stored");
    check(n_over == exp_over && exp_over > 0, "overflow drops");
    check(n_serr == 2, "two sync errors");
    check(n_start == 298, "packet starts");
    check(locked, "locked at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
