// tb_input_switch: random LVDS and SDI words with random select; one cycle later
// the output must be the selected source (8-bit LVDS byte, or the upper eight
// bits of the 10-bit SDI word) with that source's valid.
module tb_input_switch;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic sel_sdi = 0, lvds_valid = 0, sdi_valid = 0, main_valid;
  logic [7:0] lvds_data = 0, main_data;
  logic [9:0] sdi_data = 0;
  input_switch dut (.clk, .rst_n, .sel_sdi, .lvds_valid, .lvds_data, .sdi_valid, .sdi_data,
                    .main_valid, .main_data);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [7:0] exp_d; logic exp_v;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      sel_sdi = (i % 500) >= 250; lvds_valid = 1'($urandom); sdi_valid = 1'($urandom);
      lvds_data = 8'($urandom); sdi_data = 10'($urandom);
      exp_v = sel_sdi ? sdi_valid : lvds_valid;
      exp_d = sel_sdi ? sdi_data[9:2] : lvds_data;
      @(negedge clk);
      check(main_valid == exp_v, "valid");
      check(!exp_v || main_data == exp_d, "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
