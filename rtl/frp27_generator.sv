// frp27_generator: the coder's "frame pulse generator". The DVCpro coder needs
// FRP27, a signal that rises at the start of a video frame. It is taken from the
// Time Reference Signals of the ITU-601 stream on MAIN: a TRS is FF 00 00 XY,
// where bit 6 of XY is the field bit F. A pipeline keeps the three previous
// bytes; when they are FF, 00, 00, bit 6 of the current byte is copied to
// FRP27, which otherwise holds its value. FRP27 thus follows F and rises where
// F rises.
//
// Timing: FRP27 changes one cycle after the XY byte is on the input.
module frp27_generator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // a video byte is on din
  input  logic [7:0] din,
  output logic       frp27
);

  logic [7:0] b1, b2, b3;   // previous bytes, b1 most recent

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1    <= '0;
      b2    <= '0;
      b3    <= '0;
      frp27 <= 1'b0;
    end else if (en) begin
      b1 <= din;
      b2 <= b1;
      b3 <= b2;
      if (b3 == 8'hFF && b2 == 8'h00 && b1 == 8'h00) frp27 <= din[6];
    end
  end

endmodule
