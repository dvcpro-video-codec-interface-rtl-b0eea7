// tb_aes_rx_config: after reset the block must send one word: chip select low
// for the whole transfer, exactly CFG_BITS bits sampled on the rising clock
// edges equal to CFG_WORD most significant bit first, a serial clock half
// period of HALF_PERIOD cycles, done raised CFG_BITS*2*HALF_PERIOD + 1 cycles
// after reset, and nothing more afterwards. Run with the default parameters.
module tb_aes_rx_config;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int unsigned BITS = 16, HP = 8;
  localparam logic [31:0] WORD = 32'h15;
  logic cs_n, sclk, sdata, done;
  aes_rx_config dut (.clk, .rst_n, .cfg_cs_n(cs_n), .cfg_sclk(sclk), .cfg_data(sdata), .done);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [31:0] got;
    int nbits, cyc, last_edge, done_cyc;
    logic sclk_q;
    got = 0; nbits = 0; cyc = 0; last_edge = -1; done_cyc = -1; sclk_q = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (BITS * 2 * HP + 200) begin
      @(negedge clk); cyc++;
      if (sclk != sclk_q) begin
        if (sclk) check(cs_n == 1'b0, "rising clock only while selected");
        if (last_edge >= 0) check(cyc - last_edge == HP, "half period");
        last_edge = cyc;
        if (sclk) begin got = {got[30:0], sdata}; nbits++; end
      end
      sclk_q = sclk;
      if (done && done_cyc < 0) done_cyc = cyc;
      if (done) check(cs_n == 1'b1, "deselected when done");
    end
    check(nbits == BITS, $sformatf("%0d bits", nbits));
    check(got[BITS-1:0] == WORD[BITS-1:0], $sformatf("word %h", got));
    check(done_cyc == BITS * 2 * HP + 1, $sformatf("done at %0d", done_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
