// crc16_ccitt: byte-serial CRC with the CCITT generator g(x) = 1 + x^5 + x^12 + x^16
// and an all-zero initial register, as used for the per-sector check word.
//
// In the coder the register runs over all DVCpro bytes of a sector and its value
// is appended, high byte first, after the last data byte. In the decoder the same
// module runs over the received data followed by the two check bytes; a zero
// register then means no error was detected. Bits enter most significant first
// (this bit order is this design's choice).
//
// Timing: init clears the register synchronously (and wins over en); with en the
// register takes data in one cycle.
module crc16_ccitt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc
);

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] d);
    logic [15:0] r;
    logic        fb;
    r = c;
    for (int i = 7; i >= 0; i--) begin
      fb = r[15] ^ d[i];
      r  = {r[14:0], 1'b0};
      if (fb) r = r ^ 16'h1021;
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '0;
    else if (init) crc <= '0;
    else if (en)   crc <= crc_byte(crc, data);
  end

endmodule
