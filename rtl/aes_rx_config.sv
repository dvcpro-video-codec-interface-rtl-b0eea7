// aes_rx_config: the one-shot "AES RX configuration" block. After reset it sends
// a serial control word to the AES/EBU receiver and sample rate converter so
// that the device delivers right-justified serial audio, the format the DVCpro
// codec takes, and then stays idle.
//
// The word is shifted out most significant bit first on cfg_data, with cfg_cs_n
// low for the whole transfer and data changing on the falling edge of cfg_sclk,
// which runs at clk / (2*HALF_PERIOD). The word itself, its length and the
// serial protocol belong to the receiver device and are not in the document:
// CFG_WORD and CFG_BITS are placeholders to be set for the device used.
//
// Timing: the transfer starts after reset and takes CFG_BITS*2*HALF_PERIOD
// cycles; done then stays high.
module aes_rx_config #(
  parameter int unsigned  CFG_BITS    = 16,
  parameter logic [31:0]  CFG_WORD    = 32'h0000_0015,
  parameter int unsigned  HALF_PERIOD = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic cfg_cs_n,
  output logic cfg_sclk,
  output logic cfg_data,
  output logic done
);

  localparam int unsigned HW = $clog2(HALF_PERIOD + 1);
  logic [HW-1:0] hcnt;
  logic [5:0]    bitn;     // bits still to send
  logic [31:0]   shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt     <= '0;
      bitn     <= 6'(CFG_BITS);
      shreg    <= CFG_WORD << (32 - CFG_BITS);
      cfg_cs_n <= 1'b1;
      cfg_sclk <= 1'b0;
      cfg_data <= 1'b0;
      done     <= 1'b0;
    end else if (!done) begin
      if (cfg_cs_n) begin
        cfg_cs_n <= 1'b0;
        cfg_data <= shreg[31];
        shreg    <= shreg << 1;
      end else if (hcnt == HW'(HALF_PERIOD - 1)) begin
        hcnt     <= '0;
        cfg_sclk <= ~cfg_sclk;
        if (cfg_sclk) begin            // falling edge: next bit or finish
          if (bitn == 6'd1) begin
            cfg_cs_n <= 1'b1;
            done     <= 1'b1;
          end else begin
            cfg_data <= shreg[31];
            shreg    <= shreg << 1;
          end
          bitn <= bitn - 6'd1;
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

endmodule
