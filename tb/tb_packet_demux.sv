// tb_packet_demux: a random byte stream with packet starts and a channel
// select is applied; one cycle later only the selected channel may show the
// byte, its valid and its start-of-packet, and the other channel must be idle.
module tb_packet_demux;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic tx_valid = 0, tx_sop = 0, tx_chan = 0;
  logic [7:0] tx_data = 0;
  logic [1:0] ch_valid, ch_sop;
  logic [7:0] ch_data [2];
  packet_demux dut (.clk, .rst_n, .tx_valid, .tx_sop, .tx_data, .tx_chan, .ch_valid, .ch_sop, .ch_data);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic v, s, c; logic [7:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      v = 1'($urandom); s = v && ($urandom % 8 == 0); c = 1'($urandom); d = 8'($urandom);
      tx_valid = v; tx_sop = s; tx_chan = c; tx_data = d;
      @(negedge clk);
      check(ch_valid[c] == v && ch_valid[!c] == 1'b0, "valid routing");
      check(ch_sop[c] == s && ch_sop[!c] == 1'b0, "sop routing");
      check(!v || ch_data[c] == d, "data routing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
