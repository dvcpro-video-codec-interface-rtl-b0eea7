// read_controller: the decoder's "read controller" and "packet multiplexer".
// The two DVB-T streams arrive through two receivers with a variable delay
// between them; each stream's packets wait in its own packet FIFO. This block
// takes the packets from the two FIFOs in the order of their headers and offers
// the framer a single stream of DVCpro bytes.
//
// It expects packets in sequence: (sector, packet address) = (S, 0), (S, 1), ...
// where S is set by the framer at every sector start (new_sector). The packet
// with the expected tag is taken from whichever FIFO holds it at its head; while
// it is missing the framer is told there is no data. A head packet that can no
// longer be used (an earlier address of the expected sector, or a sector other
// than the expected one and the one after it) is discarded (stale pulse). The
// framer pulls bytes with req; skip drops the rest of the current packet after
// the CRC at a sector end. These ordering and discard rules are this design's
// choice; the document only says the packets are read "in the right order using
// the decoded packet headers".
//
// Timing: byte data and ok are combinational from the FIFO heads; state changes
// at the clock edge. skew_wait pulses when the expected packet is missing but a
// later packet of the same sector is already waiting in a FIFO.
module read_controller
  import dvcpro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // the two FIFO read ports
  input  logic       rd_avail   [2],
  input  pkt_tag_t   rd_tag     [2],
  output logic [7:0] rd_off     [2],
  input  logic [7:0] rd_data    [2],
  output logic       rd_release [2],
  // framer side
  input  logic       req,
  output logic       ok,
  output logic [7:0] data,
  output logic [2:0] head_mode,
  input  logic       skip,
  input  logic       new_sector,
  input  logic [3:0] sector,
  // status
  output logic       stale,
  output logic       skew_wait
);

  logic       cur_valid, cur;
  logic [7:0] off;
  logic [4:0] exp_sector;
  logic [6:0] exp_addr;
  logic       synced;
  logic       match [2];
  logic       drop  [2];
  logic       later [2];
  logic       sel;
  logic       waiting, waiting_q;
  logic [4:0] next_sector;

  always_comb begin
    next_sector = (exp_sector == 5'(N_SECTORS - 1)) ? 5'd0 : exp_sector + 5'd1;
    for (int i = 0; i < 2; i++) begin
      match[i] = rd_avail[i] && rd_tag[i].sector == exp_sector && rd_tag[i].addr == exp_addr;
      later[i] = rd_avail[i] && rd_tag[i].sector == exp_sector && rd_tag[i].addr > exp_addr;
      drop[i]  = synced && rd_avail[i] && !(cur_valid && cur == 1'(i)) &&
                 ((rd_tag[i].sector == exp_sector && rd_tag[i].addr < exp_addr) ||
                  (rd_tag[i].sector != exp_sector && rd_tag[i].sector != next_sector));
    end
    sel       = cur_valid ? cur : !match[0];
    ok        = cur_valid || match[0] || match[1];
    data      = rd_data[sel];
    head_mode = rd_tag[sel].mode;
    waiting   = !ok && (later[0] || later[1]);
    for (int i = 0; i < 2; i++) begin
      rd_off[i]     = off;
      rd_release[i] = drop[i] ||
                      (req && ok && sel == 1'(i) && off == 8'(PAYLOAD_BYTES - 1)) ||
                      (skip && cur_valid && cur == 1'(i));
    end
    stale     = drop[0] || drop[1];
    skew_wait = waiting && !waiting_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid  <= 1'b0;
      cur        <= 1'b0;
      off        <= '0;
      exp_sector <= '0;
      exp_addr   <= '0;
      synced     <= 1'b0;
      waiting_q  <= 1'b0;
    end else begin
      waiting_q <= waiting;
      if (skip && cur_valid) begin
        cur_valid <= 1'b0;
        off       <= '0;
        exp_addr  <= exp_addr + 7'd1;
      end else if (req && ok) begin
        if (off == 8'(PAYLOAD_BYTES - 1)) begin
          cur_valid <= 1'b0;
          off       <= '0;
          exp_addr  <= exp_addr + 7'd1;
        end else begin
          cur_valid <= 1'b1;
          cur       <= sel;
          off       <= off + 8'd1;
        end
      end
      if (new_sector) begin
        exp_sector <= {1'b0, sector};
        exp_addr   <= '0;
        synced     <= 1'b1;
      end
    end
  end

endmodule
