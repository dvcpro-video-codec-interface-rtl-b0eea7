// input_switch: chooses the uncompressed video source for the codec's 8-bit MAIN
// bus: the parallel LVDS input (camera head) or the descrambled serial SDI input.
// The SDI path carries 10-bit words; the upper 8 bits are the 8-bit video sample
// (dropping the two extra LSBs is this design's choice for 8-bit operation).
// In the original board the choice is made with a DIP switch.
//
// Timing: one register stage; valid follows the chosen source's valid.
// Lint note: sdi_data[1:0] is unused for that reason.
module input_switch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel_sdi,
  input  logic       lvds_valid,
  input  logic [7:0] lvds_data,
  input  logic       sdi_valid,
  input  logic [9:0] sdi_data,
  output logic       main_valid,
  output logic [7:0] main_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_valid <= 1'b0;
      main_data  <= '0;
    end else if (sel_sdi) begin
      main_valid <= sdi_valid;
      main_data  <= sdi_data[9:2];
    end else begin
      main_valid <= lvds_valid;
      main_data  <= lvds_data;
    end
  end

endmodule
