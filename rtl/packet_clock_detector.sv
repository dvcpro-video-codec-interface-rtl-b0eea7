// packet_clock_detector: recovers the packet clock from one received DVB-T
// stream, as the reference for the decoder's 27 MHz clock PLL. Every accepted
// sync byte of that stream (pkt_start from its header decoder) gives one
// pkt_clk pulse. present is high while packets keep coming: it drops when no
// sync byte has been seen for TIMEOUT cycles, so that the phase detector is
// not fed a missing reference. The timeout is this design's addition.
//
// Timing: pkt_clk is pkt_start delayed by one register.
module packet_clock_detector #(
  parameter int unsigned TIMEOUT = 4*2244
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,
  output logic pkt_clk,
  output logic present
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  logic [TW-1:0] idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_clk <= 1'b0;
      present <= 1'b0;
      idle    <= '0;
    end else begin
      pkt_clk <= pkt_start;
      if (pkt_start) begin
        idle    <= '0;
        present <= 1'b1;
      end else if (idle == TW'(TIMEOUT - 1)) begin
        present <= 1'b0;
      end else begin
        idle <= idle + 1'b1;
      end
    end
  end

endmodule
