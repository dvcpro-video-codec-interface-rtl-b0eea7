// tb_trs_generator: runs the generator over 2.3 frames of random video with
// random enable gaps and a rising FRP partway through the first frame. A model
// of the 625-line, 1728-byte line structure (ITU-R BT.656 TRS positions and
// F/V line ranges) predicts every output word, which must appear three enabled
// cycles after its input. Over one full frame from the FRP, each of the eight
// EAV/SAV codes must occur the number of times the 625-line format has.
module tb_trs_generator;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, frp = 0;
  logic [7:0] vid_in = 0;
  logic [9:0] vid_out;
  trs_generator dut (.clk, .rst_n, .en, .frp, .vid_in, .vid_out);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic logic [9:0] expect_word(input int s, input int ln, input logic [7:0] v);
    bit f, vb, h;
    int l1;
    l1 = ln + 1;
    f  = l1 >= 313;
    vb = (l1 <= 22) || (l1 >= 311 && l1 <= 335) || (l1 >= 624);
    h  = s < 1724;
    if (s == 1440 || s == 1724) return 10'h3FF;
    if (s == 1441 || s == 1442 || s == 1725 || s == 1726) return 10'h000;
    if (s == 1443 || s == 1727) return {1'b1, f, vb, h, vb ^ h, f ^ h, f ^ vb, f ^ vb ^ h, 2'b00};
    return {v, 2'b00};
  endfunction

  typedef struct { logic [9:0] w; bit in_frame; } exp_t;
  exp_t expq [$];
  int code_cnt [256];
  initial begin
    int s, ln, nen, frame_left;
    bit frp_q;
    logic [7:0] v;
    logic [9:0] o1, o2, o3;
    exp_t e;
    s = 0; ln = 0; nen = 0; frp_q = 0; frame_left = 0;
    o1 = 0; o2 = 0; o3 = 0;
    for (int i = 0; i < 256; i++) code_cnt[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (nen < 1728 * 625 * 2 + 300000) begin
      en = ($urandom % 8) != 0;
      v = 8'(8'h10 + $urandom % 8'hD0);
      vid_in = v;
      if (nen == 400000) frp = 1;
      if (en) begin
        if (frp && !frp_q) begin s = 552; ln = 0; frame_left = 1728 * 625; end
        frp_q = frp;
        e.w = expect_word(s, ln, v);
        e.in_frame = frame_left > 0;
        if (frame_left > 0) frame_left--;
        expq.push_back(e);
        if (s == 1727) begin s = 0; ln = (ln == 624) ? 0 : ln + 1; end else s++;
        nen++;
      end
      @(negedge clk);
      if (en && expq.size() == 3) begin
        e = expq.pop_front();
        check(vid_out == e.w, $sformatf("word %0d: %h expected %h", nen, vid_out, e.w));
        if (e.in_frame && o3 == 10'h3FF && o2 == 10'h000 && o1 == 10'h000)
          code_cnt[vid_out[9:2]]++;
        o3 = o2; o2 = o1; o1 = vid_out;
      end
    end
    // one 625-line frame: field 1 has 24 blanking and 288 active lines,
    // field 2 has 25 blanking and 288 active lines
    check(code_cnt[8'hB6] == 24 && code_cnt[8'hAB] == 24, "field 1 blanking EAV/SAV");
    check(code_cnt[8'h9D] == 288 && code_cnt[8'h80] == 288, "field 1 active EAV/SAV");
    check(code_cnt[8'hF1] == 25 && code_cnt[8'hEC] == 25, "field 2 blanking EAV/SAV");
    check(code_cnt[8'hDA] == 288 && code_cnt[8'hC7] == 288, "field 2 active EAV/SAV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
