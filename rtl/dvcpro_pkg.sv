// dvcpro_pkg: constants, types and block-classification functions shared by the
// coder-mode and decoder-mode logic of the DVCpro interface.
//
// DVCpro data structure: a frame is 12 sectors; a sector is a short lead-in,
// 28 groups of 6 blocks, and a tail of padding; a block is 80 data bytes
// (160 nibbles on the 4-bit codec bus) followed by 8 padding bytes. Group 0 of
// each sector is the control group (header, subcode, VAUX); groups 1..27 each
// hold one compressed video segment in blocks 0..4, and block 5 carries audio
// in 9 of them and is unused (dummy) in the other 18.
//
// Which 9 groups carry audio is this design's choice (groups 1, 4, 7, ..., 25);
// so is the position of the three ID bytes (the first three bytes of a block).
//
// Lint note: not every module uses every constant here, so a lint run over a
// single module reports the package constants that module leaves unused.
package dvcpro_pkg;

  localparam int unsigned N_SECTORS      = 12;   // sectors per frame
  localparam int unsigned N_GROUPS       = 28;   // groups per sector
  localparam int unsigned N_BLOCKS       = 6;    // blocks per group
  localparam int unsigned BLOCK_NIBBLES  = 160;  // 80 data bytes per block
  localparam int unsigned SLOT_NIBBLES   = 176;  // 80 data + 8 padding bytes
  localparam int unsigned ID_NIBBLES     = 6;    // three ID (framing) bytes
  localparam logic [7:0]  NIB_IDLE       = 8'(SLOT_NIBBLES); // nibble index outside any block

  localparam int unsigned PKT_BYTES      = 188;  // DVB-T transport packet
  localparam int unsigned HDR_BYTES      = 6;    // sync, 3 reserved, 2 header bytes
  localparam int unsigned PAYLOAD_BYTES  = 182;  // DVCpro bytes per packet
  localparam logic [7:0]  SYNC_BYTE      = 8'h47;

  // Data rate options carried in the 3-bit multiplexing-mode header field.
  typedef enum logic [2:0] {
    MODE_32M256 = 3'd0,  // all 168 blocks, 80 bytes each (padding dropped)
    MODE_28M800 = 3'd1,  // dummy blocks dropped too (150 blocks)
    MODE_27M072 = 3'd2,  // audio dropped too (141 blocks)
    MODE_24M948 = 3'd3   // video blocks only, ID bytes dropped (77 bytes each)
  } mux_mode_t;

  typedef enum logic [1:0] {BLK_CTRL, BLK_VIDEO, BLK_AUDIO, BLK_DUMMY} blk_class_t;

  // Position of one nibble in the DVCpro stream.
  typedef struct packed {
    logic [3:0] sector;   // 0..11
    logic [4:0] group;    // 0..27
    logic [2:0] block;    // 0..5
    logic [7:0] nibble;   // 0..159 data, 160..175 padding, 176 outside a block
  } dv_pos_t;

  // Tag stored with every packet in a packet FIFO.
  typedef struct packed {
    logic [2:0] mode;     // multiplexing mode
    logic [4:0] sector;   // sector address
    logic [6:0] addr;     // packet address within the sector
  } pkt_tag_t;

  function automatic blk_class_t block_class(input logic [4:0] group, input logic [2:0] block);
    if (group == 5'd0)                                  return BLK_CTRL;
    else if (block < 3'd5)                              return BLK_VIDEO;
    else if (((int'(group) - 1) % 3) == 0)              return BLK_AUDIO;
    else                                                return BLK_DUMMY;
  endfunction

  // True for the nibbles that are transmitted in a given data rate option.
  function automatic logic keep_nibble(input logic [2:0] mode, input logic [4:0] group,
                                       input logic [2:0] block, input logic [7:0] nibble);
    blk_class_t c;
    c = block_class(group, block);
    if (nibble >= 8'(BLOCK_NIBBLES)) return 1'b0;
    case (mode)
      MODE_32M256: return 1'b1;
      MODE_28M800: return c != BLK_DUMMY;
      MODE_27M072: return c == BLK_CTRL || c == BLK_VIDEO;
      MODE_24M948: return c == BLK_VIDEO && nibble >= 8'(ID_NIBBLES);
      default:     return 1'b1;
    endcase
  endfunction

endpackage
