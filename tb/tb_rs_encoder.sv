// tb_rs_encoder: random 141-byte packets with random input gaps and output
// stalls. Each 187-byte output packet is checked with the testbench's own
// GF(256) arithmetic (log/antilog tables): the first 141 bytes equal the
// input, out_last marks byte 187, and the codeword evaluated at a^0..a^45 is
// zero (all 46 syndromes), i.e. it is a codeword of the RS(187,141) code. A
// copy with one byte changed must give a non-zero syndrome.
module tb_rs_encoder;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int K = 141, P = 46, NPKT = 40;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int alog [512];
  int glog [256];
  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x; alog[i + 255] = x; glog[x] = i;
      x = x << 1; if (x & 256) x = x ^ 'h11D;
    end
  end
  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alog[glog[a] + glog[b]];
  endfunction
  function automatic bit syn_zero(ref int cw [P + K]);
    for (int j = 0; j < P; j++) begin
      int s;
      s = 0;
      for (int i = 0; i < K + P; i++) s = mul(s, alog[j]) ^ cw[i];
      if (s != 0) return 0;
    end
    return 1;
  endfunction

  logic in_valid = 0, in_ready, out_ready = 0, out_valid, out_last;
  logic [7:0] in_data = 0, out_data;
  rs_encoder dut (.*);

  int sent [$];
  int cw [P + K];
  int n_out = 0, n_pkt = 0, n_data_bad = 0, n_last_bad = 0, n_syn_bad = 0, n_err_missed = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    cw[n_out] = int'(out_data);
    if (out_last != (n_out == K + P - 1)) n_last_bad++;
    if (n_out < K && int'(out_data) != sent[n_pkt * K + n_out]) n_data_bad++;
    if (n_out == K + P - 1) begin
      if (!syn_zero(cw)) n_syn_bad++;
      cw[n_pkt % (K + P)] ^= 'h5A;
      if (syn_zero(cw)) n_err_missed++;
      n_pkt++;
      n_out = 0;
    end else n_out++;
  end

  initial begin
    int i;
    repeat (2) @(negedge clk); rst_n = 1;
    i = 0;
    while (n_pkt < NPKT) begin
      out_ready = $urandom % 5 != 0;
      in_valid  = i < NPKT * K && $urandom % 4 != 0;
      in_data   = (i % 7 == 3) ? 8'h00 : 8'($urandom);
      @(posedge clk);
      if (in_valid && in_ready) begin sent.push_back(int'(in_data)); i++; end
      @(negedge clk);
    end
    $display("%0d packets encoded", n_pkt);
    check(n_pkt == NPKT, "all packets out");
    check(n_data_bad == 0, "data bytes passed through");
    check(n_last_bad == 0, "out_last on byte 187");
    check(n_syn_bad == 0, "every packet is an RS(187,141) codeword");
    check(n_err_missed == 0, "a changed byte gives a non-zero syndrome");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
