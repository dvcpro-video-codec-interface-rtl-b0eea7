// sdi_scrambler: serial digital interface channel coding for the decoder's
// video output, done on 10-bit parallel words before the parallel-to-serial
// converter. Each bit, least significant first, is scrambled with the
// self-synchronising polynomial x^9 + x^4 + 1 and then NRZI coded (x + 1), as
// in the SDI standard; the document names the block but not its polynomials,
// which are taken from that standard.
//
// Timing: one word per enabled cycle, one register stage.
module sdi_scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] din,
  output logic       dout_valid,
  output logic [9:0] dout
);

  logic [8:0] sreg;   // last 9 scrambled bits, [0] most recent
  logic       nrzi;   // last line bit

  logic [8:0] s_next;
  logic       n_next;
  logic [9:0] o_next;

  // Bit-serial coding of one word, least significant bit first.
  always_comb begin
    logic b;
    s_next = sreg;
    n_next = nrzi;
    o_next = '0;
    for (int i = 0; i < 10; i++) begin
      b         = din[i] ^ s_next[8] ^ s_next[3];
      s_next    = {s_next[7:0], b};
      n_next    = n_next ^ b;
      o_next[i] = n_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg       <= '0;
      nrzi       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= en;
      if (en) begin
        sreg <= s_next;
        nrzi <= n_next;
        dout <= o_next;
      end
    end
  end

endmodule
