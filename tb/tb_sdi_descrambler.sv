// tb_sdi_descrambler: random 10-bit words are coded by a bit-serial model in the
// testbench (x^9 + x^4 + 1 scrambling, then NRZI, least significant bit first,
// starting from a non-zero state unknown to the block) and fed to the block.
// After the first word, which the self-synchronising descrambler cannot yet
// decode, every output must equal the original word, one cycle after input.
module tb_sdi_descrambler;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, dout_valid;
  logic [9:0] din = 0, dout;
  sdi_descrambler dut (.clk, .rst_n, .en, .din, .dout_valid, .dout);

  bit hist [9];
  bit line_bit;
  function automatic logic [9:0] code_word(input logic [9:0] w);
    logic [9:0] o;
    for (int i = 0; i < 10; i++) begin
      bit s;
      s = w[i] ^ hist[8] ^ hist[3];
      for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      line_bit = line_bit ^ s;
      o[i] = line_bit;
    end
    return o;
  endfunction

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [9:0] w;
    int nw;
    for (int k = 0; k < 9; k++) hist[k] = (k % 3 == 1);
    line_bit = 1;
    nw = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom % 4) != 0;
      w = (i % 300 < 40) ? 10'h040 : 10'($urandom);
      if (en) din = code_word(w);
      @(negedge clk);
      check(dout_valid == en, "valid");
      if (en) begin
        if (nw > 0) check(dout == w, $sformatf("word %0d: %h expected %h", i, dout, w));
        nw++;
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
