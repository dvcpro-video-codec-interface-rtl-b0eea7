// tb_phase_detector: pairs of reference and divided-VCXO pulses with a random
// offset d (-60..60 cycles). up must be high for exactly d cycles when the
// reference leads, down for exactly -d cycles when it lags, neither for
// coincident pulses, and both must stay low while ref_present is low.
module tb_phase_detector;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic ref_present = 1, ref_pulse = 0, div_pulse = 0, up, down;
  phase_detector dut (.clk, .rst_n, .ref_present, .ref_pulse, .div_pulse, .up, .down);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int n_up, n_down;
  always @(negedge clk) begin
    if (up) n_up++;
    if (down) n_down++;
  end

  initial begin
    int d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      d = (k % 25 == 0) ? 0 : int'($urandom % 121) - 60;
      ref_present = (k % 50) != 49;
      n_up = 0; n_down = 0;
      for (int t = 0; t < 70; t++) begin
        ref_pulse = (d >= 0) ? t == 0 : t == -d;
        div_pulse = (d >= 0) ? t == d : t == 0;
        @(negedge clk);
      end
      ref_pulse = 0; div_pulse = 0;
      repeat (5) @(negedge clk);
      if (!ref_present) check(n_up == 0 && n_down == 0, "quiet without reference");
      else begin
        check(n_up == (d > 0 ? d : 0), $sformatf("up %0d for d=%0d", n_up, d));
        check(n_down == (d < 0 ? -d : 0), $sformatf("down %0d for d=%0d", n_down, d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
