// time_interleaver: the block time interleaver (DEINT = 0) and de-interleaver
// (DEINT = 1) of the proposed error protection for the radio link. A deep fade
// wipes out a run of consecutive transmitted bytes; interleaving spreads such
// a run over many RS-coded packets so that each packet loses only a few bytes,
// within what the RS code can correct.
//
// Interleaver: N packets of ROW_BYTES (187) bytes are written into the rows of
// a memory and read out by columns: byte 0 of every packet, then byte 1 of
// every packet, and so on. With N a multiple of ROW_BYTES each column fills
// whole transmitted packets (N = 748 gives 4 packets per column); the sync byte
// is not part of the block and is added when the packet is sent.
// De-interleaver: the same memory written by columns and read by rows, giving
// back the original packets.
//
// The memory is double-buffered (two banks of N x ROW_BYTES bytes): one bank
// is written while the other, already full, is read. in_ready is low while both
// banks are full; a bank is read, one byte per cycle with out_ready high, only
// once it is full. The row/column organisation and the depth N = 748 are the
// document's; the double buffering and the stream handshake are this design's.
//
// Timing: out_data/out_valid are registered, one cycle after the read;
// out_first marks the first byte of each block. The delay through an
// interleaver and de-interleaver pair is about two blocks (2 x N x ROW_BYTES
// byte periods).
module time_interleaver #(
  parameter int unsigned N         = 748,
  parameter int unsigned ROW_BYTES = 187,
  parameter bit          DEINT     = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  input  logic       out_ready,
  output logic       out_valid,
  output logic       out_first,
  output logic [7:0] out_data
);

  localparam int unsigned BLOCK = N * ROW_BYTES;
  localparam int unsigned AW    = $clog2(2 * BLOCK);
  localparam int unsigned RW    = $clog2(N);
  localparam int unsigned CW    = $clog2(ROW_BYTES);

  logic [7:0]    mem [2 * BLOCK];
  logic [1:0]    full;
  logic          wb, rb;             // bank being written / read
  logic [RW-1:0] wr_row, rd_row;
  logic [CW-1:0] wr_col, rd_col;
  logic [AW-1:0] waddr, raddr;
  logic          wr, rd, wr_last, rd_last;

  // Write order: interleaver by rows, de-interleaver by columns; read order
  // the other way round. The counters always hold (row, column) of the byte.
  always_comb begin
    in_ready = !full[wb];
    wr       = in_valid && in_ready;
    rd       = out_ready && full[rb];
    waddr    = AW'(wb ? BLOCK : 0) + AW'(wr_row) * AW'(ROW_BYTES) + AW'(wr_col);
    raddr    = AW'(rb ? BLOCK : 0) + AW'(rd_row) * AW'(ROW_BYTES) + AW'(rd_col);
    wr_last  = wr_row == RW'(N - 1) && wr_col == CW'(ROW_BYTES - 1);
    rd_last  = rd_row == RW'(N - 1) && rd_col == CW'(ROW_BYTES - 1);
  end

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= in_data;
    if (rd) out_data <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      wr_row    <= '0;
      wr_col    <= '0;
      rd_row    <= '0;
      rd_col    <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= rd;
      out_first <= rd && rd_row == '0 && rd_col == '0;
      if (wr) begin
        if (!DEINT) begin                       // by rows
          if (wr_col == CW'(ROW_BYTES - 1)) begin
            wr_col <= '0;
            wr_row <= (wr_row == RW'(N - 1)) ? '0 : wr_row + 1'b1;
          end else wr_col <= wr_col + 1'b1;
        end else begin                          // by columns
          if (wr_row == RW'(N - 1)) begin
            wr_row <= '0;
            wr_col <= (wr_col == CW'(ROW_BYTES - 1)) ? '0 : wr_col + 1'b1;
          end else wr_row <= wr_row + 1'b1;
        end
        if (wr_last) wb <= ~wb;
      end
      if (rd) begin
        if (DEINT) begin                        // by rows
          if (rd_col == CW'(ROW_BYTES - 1)) begin
            rd_col <= '0;
            rd_row <= (rd_row == RW'(N - 1)) ? '0 : rd_row + 1'b1;
          end else rd_col <= rd_col + 1'b1;
        end else begin                          // by columns
          if (rd_row == RW'(N - 1)) begin
            rd_row <= '0;
            rd_col <= (rd_col == CW'(ROW_BYTES - 1)) ? '0 : rd_col + 1'b1;
          end else rd_row <= rd_row + 1'b1;
        end
        if (rd_last) rb <= ~rb;
      end
      // bank flags: set when the last byte is written, cleared when read
      for (int b = 0; b < 2; b++) begin
        if (wr && wr_last && wb == 1'(b)) full[b] <= 1'b1;
        else if (rd && rd_last && rb == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

endmodule
