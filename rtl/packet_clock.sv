// packet_clock: divides the 27 MHz system clock down to a packet rate.
//
// In the coder it paces the packet reader: the two 64-QAM rate-1/2 DVB-T
// channels take 12.032 kHz each, 24.064 kHz together, and the reader sends one
// packet per tick to the two modulators in turn; 27 MHz / 24.064 kHz gives the
// default divider of 1122. In the decoder the same divider, set to 2244
// (27 MHz / 12.032 kHz), is the "VCXO divider" whose output is compared with the
// received packet clock. The divider values are derived from those rates; the
// text gives the rates, not the dividers.
//
// Timing: tick is a one-cycle pulse every DIV enabled cycles; sync restarts the
// count so that the next tick comes DIV cycles later.
module packet_clock #(
  parameter int unsigned DIV = 1122
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic sync,
  output logic tick
);

  localparam int unsigned CW = $clog2(DIV + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (sync) begin
        cnt <= '0;
      end else if (en) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
