// tb_frp27_generator: a byte stream of random video samples (never FF) with a
// TRS (FF 00 00 XY) every 64 bytes, where the F bit of XY follows a field
// pattern. After each XY byte FRP27 must equal that F bit, and it must not change
// anywhere else. Near-misses (FF 00 01 ..., FF 01 00 ...) must be ignored.
module tb_frp27_generator;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, frp27;
  logic [7:0] din = 0;
  frp27_generator dut (.clk, .rst_n, .en, .din, .frp27);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic exp_f = 0;
  int rises = 0;
  task automatic send(input logic [7:0] b, input bit is_xy);
    en = 1; din = b; @(negedge clk);
    if (is_xy) exp_f = b[6];
    check(frp27 == exp_f, $sformatf("frp27 after byte %h", b));
    if ($urandom % 4 == 0) begin en = 0; din = 8'hFF; @(negedge clk); end
  endtask

  initial begin
    logic f, prev;
    prev = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      f = (t % 10) >= 5;
      if (f && !prev) rises++;
      prev = f;
      send(8'hFF, 0); send(8'h00, 0); send(8'h00, 0);
      send({1'b1, f, 1'b0, 1'b1, 4'h0}, 1);
      for (int i = 0; i < 60; i++) begin
        case (i)
          10: begin send(8'hFF, 0); send(8'h00, 0); send(8'h01, 0); send({2'b11, 6'h0}, 0); end
          30: begin send(8'hFF, 0); send(8'h01, 0); send(8'h00, 0); send({2'b11, 6'h0}, 0); end
          default: send(8'(8'h10 + $urandom % 8'hD0), 0);
        endcase
      end
    end
    check(rises == 20, "number of frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
