// tb_packet_clock_detector: sync pulses at random gaps. pkt_clk must repeat
// every pulse one cycle later; present must rise with the first pulse, stay
// high for exactly TIMEOUT cycles after the last pulse and then drop.
module tb_packet_clock_detector;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int unsigned TO = 40;
  logic pkt_start = 0, pkt_clk, present;
  packet_clock_detector #(.TIMEOUT(TO)) dut (.clk, .rst_n, .pkt_start, .pkt_clk, .present);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int since;
    bit seen, p;
    since = 0; seen = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      p = ((i / 2000) % 2 == 0) ? ($urandom % 30 == 0) : ($urandom % 400 == 0);
      pkt_start = p;
      @(negedge clk);
      check(pkt_clk == p, "pkt_clk");
      if (p) begin since = 0; seen = 1; end else since++;
      check(present == (seen && since < int'(TO)), $sformatf("present, %0d since pulse", since));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
