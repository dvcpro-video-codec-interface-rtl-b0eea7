// trs_generator: overlays ITU-601 Time Reference Signals on the decoder's video.
// The codec's uncompressed video output carries the active picture but no TRS
// words, so EAV and SAV (FF 00 00 XY) are inserted here before the SDI output.
//
// Structure, stage by stage:
//  - edge detector: a rising FRP marks the first sample of a frame;
//  - sample counter 0..1727 (1728 bytes per line) and line counter 0..624
//    (625 lines); the rising FRP loads them with SAMPLE_RST (552) and LINE_RST,
//    the codec-specific phase; NEXT_LINE advances the line counter after 1727;
//  - sample decoder: TRS_FF, TRS_00 and TRS_FVH for the four TRS bytes of EAV
//    (samples 1440..1443) and SAV (1724..1727), and H (1 in EAV);
//  - line decoder: F (0 on lines 1..312, 1 on lines 313..625) and V (1 on lines
//    1..22, 311..335, 624..625), line number = line counter + 1;
//  - word multiplexer: replaces the sample by XY = 1 F V H P3 P2 P1 P0 with the
//    Hamming bits P3=V^H, P2=F^H, P1=F^V, P0=F^V^H;
//  - FF/00 multiplexer: replaces samples by 3FF and 000 and widens the video to
//    10 bits (two zero LSBs).
// The counter ranges, reset sample and XY format are the document's; the TRS
// sample positions, the F/V line ranges (ITU-R BT.656, 625 lines) and LINE_RST
// are taken from the standard or chosen here.
//
// Timing: three register stages from vid_in to vid_out, one byte per enabled
// cycle (27 MHz). The sample number of the byte on vid_in is the counter value,
// and SAMPLE_RST in the cycle FRP rises.
module trs_generator #(
  parameter int unsigned SAMPLE_RST = 552,
  parameter int unsigned LINE_RST   = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       frp,
  input  logic [7:0] vid_in,
  output logic [9:0] vid_out
);

  logic        frp_q, pedge;
  logic [10:0] sample_q, sample;
  logic [9:0]  line_q, line;
  logic        next_line;
  // stage 1 (decoders)
  logic        trs_ff1, trs_001, trs_fvh1, h1, f1, v1;
  logic [7:0]  vid1;
  // stage 2 (word multiplexer)
  logic        trs_ff2, trs_002;
  logic [7:0]  word2;
  logic [9:0]  lnum;

  always_comb begin
    pedge     = frp && !frp_q;
    sample    = pedge ? 11'(SAMPLE_RST) : sample_q;
    line      = pedge ? 10'(LINE_RST)   : line_q;
    next_line = sample == 11'd1727;
    lnum      = line + 10'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frp_q    <= 1'b0;
      sample_q <= '0;
      line_q   <= '0;
      {trs_ff1, trs_001, trs_fvh1, h1, f1, v1} <= '0;
      vid1     <= '0;
      {trs_ff2, trs_002} <= '0;
      word2    <= '0;
      vid_out  <= '0;
    end else if (en) begin
      frp_q    <= frp;
      // counters
      sample_q <= next_line ? 11'd0 : sample + 11'd1;
      line_q   <= next_line ? ((line == 10'd624) ? 10'd0 : line + 10'd1) : line;
      // stage 1: sample and line decoders
      trs_ff1  <= sample == 11'd1440 || sample == 11'd1724;
      trs_001  <= sample == 11'd1441 || sample == 11'd1442 ||
                  sample == 11'd1725 || sample == 11'd1726;
      trs_fvh1 <= sample == 11'd1443 || sample == 11'd1727;
      h1       <= sample < 11'd1724;
      f1       <= lnum >= 10'd313;
      v1       <= (lnum <= 10'd22) || (lnum >= 10'd311 && lnum <= 10'd335) || (lnum >= 10'd624);
      vid1     <= vid_in;
      // stage 2: TRS word multiplexer
      trs_ff2  <= trs_ff1;
      trs_002  <= trs_001;
      word2    <= trs_fvh1 ? {1'b1, f1, v1, h1, v1 ^ h1, f1 ^ h1, f1 ^ v1, f1 ^ v1 ^ h1} : vid1;
      // stage 3: FF / 00 multiplexer
      vid_out  <= trs_ff2 ? 10'h3FF : (trs_002 ? 10'h000 : {word2, 2'b00});
    end
  end

endmodule
