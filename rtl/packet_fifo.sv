// packet_fifo: a FIFO of whole packets, used once in the coder (before the
// modulators) and twice in the decoder (one per received DVB-T stream).
//
// Memory is NPKT slots of SLOT_BYTES bytes. The writer fills the current slot
// byte by byte and commits it with a tag and its length; only committed packets
// are visible to the reader. The reader sees the oldest packet: its tag, its
// length, and any byte of it by offset (bytes past the stored length read as
// 0x00, which supplies the zero padding of a partly filled packet without
// writing it). rd_release frees the slot. pkts_waiting is the number of committed
// packets and max_waiting its largest value since reset, the MAX figure used to
// size the FIFO. The three-packet depth is the depth the original system needed;
// storing a tag and a length per slot instead of the header bytes is this
// design's choice.
//
// Timing: writes and commits take effect at the clock edge; wr_commit may come
// with the last wr_en. The read data is combinational from rd_off. full is high
// while no slot is free for writing.
module packet_fifo
  import dvcpro_pkg::*;
#(
  parameter int unsigned NPKT       = 3,
  parameter int unsigned SLOT_BYTES = PAYLOAD_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  // write side
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic       wr_commit,
  input  logic       wr_abort,
  input  pkt_tag_t   wr_tag,
  output logic       full,
  // read side
  output logic       rd_avail,
  output pkt_tag_t   rd_tag,
  output logic [7:0] rd_len,
  input  logic [7:0] rd_off,
  output logic [7:0] rd_data,
  input  logic       rd_release,
  // status
  output logic [3:0] pkts_waiting,
  output logic [3:0] max_waiting
);

  localparam int unsigned PW = (NPKT > 1) ? $clog2(NPKT) : 1;

  logic [7:0] mem [NPKT*SLOT_BYTES];
  pkt_tag_t   tags [NPKT];
  logic [7:0] lens [NPKT];
  logic [PW-1:0] wptr, rptr;
  logic [7:0]    woff;
  logic [3:0]    count;
  logic          do_commit, do_release;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(NPKT - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    full       = count == 4'(NPKT);
    rd_avail   = count != 4'd0;
    rd_tag     = tags[rptr];
    rd_len     = lens[rptr];
    rd_data    = (rd_off < lens[rptr] && rd_off < 8'(SLOT_BYTES))
                 ? mem[int'(rptr) * SLOT_BYTES + int'(rd_off)] : 8'h00;
    do_commit  = wr_commit && !full;
    do_release = rd_release && rd_avail;
    pkts_waiting = count;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full && woff < 8'(SLOT_BYTES))
      mem[int'(wptr) * SLOT_BYTES + int'(woff)] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      woff        <= '0;
      count       <= '0;
      max_waiting <= '0;
      for (int i = 0; i < NPKT; i++) begin
        tags[i] <= '0;
        lens[i] <= '0;
      end
    end else begin
      if (wr_abort) begin
        woff <= '0;
      end else if (do_commit) begin
        tags[wptr] <= wr_tag;
        lens[wptr] <= woff + 8'(wr_en);
        wptr       <= inc(wptr);
        woff       <= '0;
      end else if (wr_en && !full && woff < 8'(SLOT_BYTES)) begin
        woff <= woff + 8'd1;
      end
      if (do_release) rptr <= inc(rptr);
      count <= count + 4'(do_commit) - 4'(do_release);
      if (count > max_waiting) max_waiting <= count;
    end
  end

endmodule
