// packet_demux: the packet de-multiplexer in front of the two DVB-T modulators.
// Each packet of the single stream from the packet reader is steered, whole, to
// the output of the channel named by tx_chan; the other output stays idle.
//
// Timing: one register stage.
module packet_demux (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic       tx_sop,
  input  logic [7:0] tx_data,
  input  logic       tx_chan,
  output logic [1:0] ch_valid,
  output logic [1:0] ch_sop,
  output logic [7:0] ch_data [2]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_valid <= '0;
      ch_sop   <= '0;
      ch_data  <= '{8'h00, 8'h00};
    end else begin
      for (int c = 0; c < 2; c++) begin
        ch_valid[c] <= tx_valid && (tx_chan == 1'(c));
        ch_sop[c]   <= tx_sop && (tx_chan == 1'(c));
        ch_data[c]  <= (tx_valid && tx_chan == 1'(c)) ? tx_data : 8'h00;
      end
    end
  end

endmodule
