// tb_crc16_ccitt: checks the CRC register against a bit-serial reference of
// g(x) = 1 + x^5 + x^12 + x^16 (zero start) on the ASCII string "123456789"
// (known value 0x31C3 for this zero-start, non-reflected CRC), on random
// messages, and checks that message plus appended CRC leaves a zero register.
module tb_crc16_ccitt;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic init = 0, en = 0;
  logic [7:0] data = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16_ccitt dut (.clk, .rst_n, .init, .en, .data, .crc);

  // reference: polynomial division bit by bit using the explicit taps
  function automatic logic [15:0] ref_crc(input logic [7:0] msg [], input int n);
    logic [15:0] r = 0;
    for (int k = 0; k < n; k++)
      for (int i = 7; i >= 0; i--) begin
        logic top;
        top = r[15] ^ msg[k][i];
        r = r << 1;
        if (top) begin r[0] ^= 1; r[5] ^= 1; r[12] ^= 1; end
      end
    return r;
  endfunction

  task automatic feed(input logic [7:0] b);
    data = b; en = 1; @(posedge clk); @(negedge clk); en = 0;
  endtask

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [7:0] msg [];
    logic [15:0] r;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    msg = new[9];
    foreach (msg[i]) msg[i] = 8'h31 + 8'(i);
    init = 1; @(posedge clk); @(negedge clk); init = 0;
    foreach (msg[i]) feed(msg[i]);
    check(crc == 16'h31C3, $sformatf("123456789 -> %h", crc));
    check(crc == ref_crc(msg, 9), "reference on 123456789");
    for (int t = 0; t < 40; t++) begin
      int n;
      n = 1 + ($urandom % 300);
      msg = new[n];
      foreach (msg[i]) msg[i] = 8'($urandom);
      init = 1; @(posedge clk); @(negedge clk); init = 0;
      foreach (msg[i]) feed(msg[i]);
      r = ref_crc(msg, n);
      check(crc == r, $sformatf("random message %0d", t));
      feed(r[15:8]); feed(r[7:0]);
      check(crc == 16'h0000, "syndrome zero after appended CRC");
      feed(8'h01);
      check(crc != 16'h0000, "nonzero after extra byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
