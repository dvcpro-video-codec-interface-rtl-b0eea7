// tb_packet_clock: checks that the divider ticks exactly every DIV cycles at the
// default (1122 = 27 MHz / 24.064 kHz) and that sync restarts the count.
module tb_packet_clock;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic sync = 0, tick;
  packet_clock dut (.clk, .rst_n, .en(1'b1), .sync, .tick);
  int last = -1, cyc = 0, nt = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      if (last >= 0) begin
        checks++;
        if (cyc - last != (nt == 3 ? 500 + 1 + 1122 : 1122)) begin
          failures++; $display("FAIL period %0d (tick %0d)", cyc - last, nt);
        end
      end
      last = cyc; nt++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (nt == 3);
    repeat (500) @(negedge clk);
    sync = 1; @(negedge clk); sync = 0;
    wait (nt == 8);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
