// tb_packet_fifo: writes packets of random length and tag into a 3-slot packet
// FIFO while reading them back at random moments, against a queue model:
// tags, lengths, every byte up to the slot size (zero past the length), the
// full flag, pkts_waiting, the MAX statistic, and an aborted write.
module tb_packet_fifo;
  import dvcpro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, wr_commit = 0, wr_abort = 0, rd_release = 0;
  logic [7:0] wr_data = 0, rd_off = 0;
  pkt_tag_t wr_tag = '0;
  logic full, rd_avail;
  pkt_tag_t rd_tag;
  logic [7:0] rd_len, rd_data;
  logic [3:0] pkts_waiting, max_waiting;
  packet_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .wr_commit, .wr_abort, .wr_tag, .full,
    .rd_avail, .rd_tag, .rd_len, .rd_off, .rd_data, .rd_release, .pkts_waiting, .max_waiting);

  typedef struct { pkt_tag_t tag; int len; logic [7:0] d [182]; } pkt_t;
  pkt_t q [$];
  int maxw = 0;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic write_pkt(input int len, input bit abort_first);
    pkt_t p;
    p.tag = pkt_tag_t'($urandom);
    p.len = len;
    if (abort_first) begin
      for (int i = 0; i < 5; i++) begin wr_en = 1; wr_data = 8'hEE; @(negedge clk); end
      wr_en = 0; wr_abort = 1; @(negedge clk); wr_abort = 0;
    end
    for (int i = 0; i < len; i++) begin
      p.d[i] = 8'($urandom);
      wr_en = 1; wr_data = p.d[i]; wr_tag = p.tag; wr_commit = (i == len - 1);
      @(negedge clk);
    end
    wr_en = 0; wr_commit = 0;
    q.push_back(p);
    if (q.size() > maxw) maxw = q.size();
  endtask

  task automatic read_pkt();
    pkt_t p;
    p = q.pop_front();
    check(rd_avail, "avail");
    check(rd_tag == p.tag && int'(rd_len) == p.len, "tag/len");
    for (int i = 0; i < 182; i++) begin
      rd_off = 8'(i); #0.1;
      check(rd_data == ((i < p.len) ? p.d[i] : 8'h00), $sformatf("data %0d", i));
    end
    rd_release = 1; @(negedge clk); rd_release = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!rd_avail && !full && pkts_waiting == 0, "empty after reset");
    for (int t = 0; t < 60; t++) begin
      if (q.size() < 3 && ($urandom % 2 == 0 || q.size() == 0))
        write_pkt(1 + ($urandom % 182), t % 7 == 0);
      else read_pkt();
      check(int'(pkts_waiting) == q.size(), "pkts_waiting");
      check(full == (q.size() == 3), "full flag");
    end
    while (q.size() < 3) write_pkt(182, 0);
    check(full, "full with 3");
    // a write while full must not disturb the stored packets
    wr_en = 1; wr_data = 8'hAA; wr_commit = 1; @(negedge clk); wr_en = 0; wr_commit = 0;
    check(int'(pkts_waiting) == 3, "no commit when full");
    while (q.size() > 0) read_pkt();
    check(int'(max_waiting) == maxw, "MAX statistic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
