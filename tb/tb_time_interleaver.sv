// tb_time_interleaver: an interleaver and a de-interleaver in series (N = 8
// packets of 11 bytes, so that several blocks run quickly), with random gaps on
// both sides. Checked: the interleaver's output is the input block read by
// columns (byte k of a block is input byte (k mod N) * ROW_BYTES + k / N);
// out_first marks each block; the de-interleaver returns the original byte
// stream; and a burst of B consecutive corrupted bytes on the link leaves at
// most ceil(B / N) corrupted bytes in any packet after de-interleaving.
module tb_time_interleaver;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 8, R = 11, BLOCK = N * R, NBLK = 6, BURST = 19;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic in_valid = 0, in_ready, mid_valid, mid_first, mid_ready, out_valid, out_first;
  logic out_ready = 0;
  logic [7:0] in_data = 0, mid_data, out_data, link_data;
  logic link_valid, link_ready;
  time_interleaver #(.N(N), .ROW_BYTES(R), .DEINT(1'b0)) u_int (.clk, .rst_n, .in_valid,
    .in_data, .in_ready, .out_ready(mid_ready), .out_valid(mid_valid), .out_first(mid_first),
    .out_data(mid_data));
  // the link: a burst of corrupted bytes in block 3
  int link_k = 0;
  always_comb begin
    link_valid = mid_valid;
    link_data  = (link_k >= 3 * BLOCK + 30 && link_k < 3 * BLOCK + 30 + BURST) ? ~mid_data : mid_data;
  end
  always @(posedge clk) if (rst_n && mid_valid) link_k <= link_k + 1;
  time_interleaver #(.N(N), .ROW_BYTES(R), .DEINT(1'b1)) u_dei (.clk, .rst_n,
    .in_valid(link_valid), .in_data(link_data), .in_ready(link_ready), .out_ready,
    .out_valid, .out_first, .out_data);
  // the interleaver is read only when the de-interleaver can take the byte
  assign mid_ready = link_ready && ($urandom % 4 != 0);

  logic [7:0] sent [$];
  int n_mid = 0, n_mid_bad = 0, n_first = 0, n_out = 0, n_out_bad = 0, max_pkt_err = 0;
  int pkt_err [NBLK * N];
  initial for (int i = 0; i < NBLK * N; i++) pkt_err[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (mid_valid) begin
      int blk, k;
      blk = n_mid / BLOCK; k = n_mid % BLOCK;
      if (mid_data != sent[blk * BLOCK + (k % N) * R + k / N]) n_mid_bad++;
      if (mid_first != (k == 0)) n_mid_bad++;
      if (mid_first) n_first++;
      n_mid++;
    end
    if (out_valid) begin
      if (out_data != sent[n_out]) begin
        if (n_out / BLOCK == 3) pkt_err[n_out / R]++;
        else n_out_bad++;
      end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      begin
        int i;
        i = 0;
        while (i < NBLK * BLOCK) begin
          in_valid = $urandom % 3 != 0;
          in_data  = 8'($urandom);
          @(posedge clk);
          if (in_valid && in_ready) begin sent.push_back(in_data); i++; end
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        repeat (20000) begin
          out_ready = $urandom % 3 != 0;
          @(negedge clk);
        end
      end
    join
    for (int p = 0; p < NBLK * N; p++) if (pkt_err[p] > max_pkt_err) max_pkt_err = pkt_err[p];
    $display("interleaved %0d bytes, restored %0d, worst packet %0d errors", n_mid, n_out, max_pkt_err);
    check(n_mid == NBLK * BLOCK && n_mid_bad == 0, "interleaver reads blocks by columns");
    check(n_first == NBLK, "block starts marked");
    check(n_out == NBLK * BLOCK && n_out_bad == 0, "de-interleaver restores the stream");
    check(max_pkt_err == (BURST + N - 1) / N, "burst spread over the packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
