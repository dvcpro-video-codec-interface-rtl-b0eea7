// phase_detector: phase-frequency detector of the decoder's clock recovery
// loop. It compares the received packet clock (ref) with the 27 MHz VCXO clock
// divided down to the same rate (div). A ref pulse raises up, a div pulse
// raises down, and when both are raised both are cleared. up/down drive the
// external loop filter of the PLL and VCXO: up while the VCXO lags, down while
// it leads, each for as long as the phase difference lasts. The three-state
// detector is this design's choice; the document names a phase detector.
// Outputs are inactive while the reference is absent (ref_present low).
//
// Timing: registered outputs; a one-cycle overlap of up and down marks the
// coincident case.
module phase_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_present,
  input  logic ref_pulse,
  input  logic div_pulse,
  output logic up,
  output logic down
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else if (!ref_present) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else begin
      if ((up || ref_pulse) && (down || div_pulse)) begin
        up   <= 1'b0;
        down <= 1'b0;
      end else begin
        up   <= up || ref_pulse;
        down <= down || div_pulse;
      end
    end
  end

endmodule
