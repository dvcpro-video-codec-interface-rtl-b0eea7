// rs_encoder: systematic Reed-Solomon RS(187,141) encoder of the proposed
// error protection for the radio link. Each 141-byte data packet is followed
// by 46 parity bytes, giving the 187-byte coded packet that goes into the time
// interleaver; the code corrects up to 23 bad bytes per packet.
//
// How it works: a 46-stage byte LFSR divides the message by the generator
// polynomial g(x) = (x + a^0)(x + a^1)...(x + a^45) over GF(256). The data
// bytes pass straight through while the LFSR runs; then the 46 remainder
// bytes are shifted out, highest power first. g(x) is computed at elaboration
// by a constant function, so only fixed GF(256) multipliers (XOR networks)
// are built.
//
// From the document: the code RS(187,141) and its place in front of the time
// interleaver. This design's choices: the field polynomial
// x^8 + x^4 + x^3 + x^2 + 1 and the generator roots a^0..a^(P-1) (those of the
// DVB-T RS code), and the byte-stream handshake.
//
// Interface and timing: in_data is taken when in_valid && in_ready; in_ready
// is low while parity is sent. Data bytes appear on out_data in the same cycle
// (out_valid = in_valid during the data part); parity bytes come one per cycle
// with out_ready high. out_last marks the last parity byte of a packet. The
// first byte of each packet is counted from reset, K data bytes per packet.
module rs_encoder #(
  parameter int unsigned K = 141,   // data bytes per packet
  parameter int unsigned P = 46     // parity bytes per packet
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  input  logic       out_ready,
  output logic       out_valid,
  output logic       out_last,
  output logic [7:0] out_data
);

  typedef logic [P:0][7:0] poly_t;

  // GF(256) multiply, field polynomial x^8 + x^4 + x^3 + x^2 + 1
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1D : 8'h00);
    end
    return p;
  endfunction

  // generator polynomial coefficients, G[P] = 1
  function automatic poly_t gen_poly();
    poly_t g;
    logic [7:0] root;
    g    = '0;
    g[0] = 8'h01;
    root = 8'h01;
    for (int i = 0; i < int'(P); i++) begin
      for (int j = int'(P); j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
      root = gf_mul(root, 8'h02);
    end
    return g;
  endfunction

  localparam poly_t G = gen_poly();
  localparam int unsigned KW = $clog2(K + 1);
  localparam int unsigned PW = $clog2(P + 1);

  logic [P-1:0][7:0] par;
  logic [KW-1:0]     n_data;       // data bytes taken of this packet
  logic [PW-1:0]     n_par;        // parity bytes sent of this packet
  logic              parity;       // sending parity
  logic [7:0]        fb;

  always_comb begin
    in_ready  = !parity && out_ready;
    out_valid = parity ? 1'b1 : in_valid;
    out_data  = parity ? par[P-1] : in_data;
    out_last  = parity && n_par == PW'(P - 1);
    fb        = in_data ^ par[P-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par    <= '0;
      n_data <= '0;
      n_par  <= '0;
      parity <= 1'b0;
    end else if (!parity) begin
      if (in_valid && in_ready) begin
        for (int i = int'(P) - 1; i > 0; i--) par[i] <= par[i-1] ^ gf_mul(fb, G[i]);
        par[0] <= gf_mul(fb, G[0]);
        if (n_data == KW'(K - 1)) begin
          n_data <= '0;
          parity <= 1'b1;
        end else n_data <= n_data + 1'b1;
      end
    end else if (out_ready) begin
      for (int i = int'(P) - 1; i > 0; i--) par[i] <= par[i-1];
      par[0] <= '0;
      if (n_par == PW'(P - 1)) begin
        n_par  <= '0;
        parity <= 1'b0;
      end else n_par <= n_par + 1'b1;
    end
  end

endmodule
