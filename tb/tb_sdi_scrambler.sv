// tb_sdi_scrambler: random 10-bit words are scrambled by the block and, in
// parallel, by a bit-serial model in the testbench (generator x^9 + x^4 + 1,
// then NRZI, least significant bit first). Every output word must match the
// model, one cycle after its input, including across idle cycles.
module tb_sdi_scrambler;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, dout_valid;
  logic [9:0] din = 0, dout;
  sdi_scrambler dut (.clk, .rst_n, .en, .din, .dout_valid, .dout);

  // serial reference: history of scrambled bits, most recent first
  bit hist [9];
  bit line_bit;
  function automatic logic [9:0] ref_word(input logic [9:0] w);
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
    logic [9:0] e;
    for (int k = 0; k < 9; k++) hist[k] = 0;
    line_bit = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom % 4) != 0;
      // runs of constant words, as in blanking, stress the scrambler
      din = (i % 300 < 40) ? 10'h200 : 10'($urandom);
      if (en) e = ref_word(din);
      @(negedge clk);
      check(dout_valid == en, "valid");
      if (en) check(dout == e, $sformatf("word %0d: %h expected %h", i, dout, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
