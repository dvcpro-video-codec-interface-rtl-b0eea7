// sdi_descrambler: undoes SDI channel coding on the coder's serial video input,
// working on the 10-bit words delivered by the serial-to-parallel converter
// (assumed word aligned). Each bit, least significant first, is NRZI decoded
// (x + 1) and then descrambled with x^9 + x^4 + 1. The polynomials are those of
// the SDI standard; the document names the block only.
//
// Timing: one word per enabled cycle, one register stage. The descrambler is
// self-synchronising: after 10 bits its output is correct whatever its start.
module sdi_descrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] din,
  output logic       dout_valid,
  output logic [9:0] dout
);

  logic [8:0] sreg;   // last 9 NRZI-decoded bits, [0] most recent
  logic       last;   // last line bit

  logic [8:0] s_next;
  logic       l_next;
  logic [9:0] o_next;

  // Bit-serial decoding of one word, least significant bit first.
  always_comb begin
    logic b;
    s_next = sreg;
    l_next = last;
    o_next = '0;
    for (int i = 0; i < 10; i++) begin
      b         = din[i] ^ l_next;
      l_next    = din[i];
      o_next[i] = b ^ s_next[8] ^ s_next[3];
      s_next    = {s_next[7:0], b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg       <= '0;
      last       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= en;
      if (en) begin
        sreg <= s_next;
        last <= l_next;
        dout <= o_next;
      end
    end
  end

endmodule
