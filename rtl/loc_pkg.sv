// loc_pkg: types and constants shared by the localization subsystem.
//
// Coordinates are 8-bit signed integers and hop counts 5-bit unsigned, as the
// fixed-point format of the design prescribes. The least-squares matrix A is kept
// in 16-bit words and the right-hand side b in 26-bit words (9 and 19 significant
// bits plus 7 bits of headroom for CORDIC growth). The packet layout (loc_pkt_t)
// and its type codes are this design's own choice: the link-layer format is not
// part of the specification.
package loc_pkg;

  localparam int unsigned COORD_W    = 8;   // signed coordinate width
  localparam int unsigned HOP_W      = 5;   // unsigned hop-count width
  localparam int unsigned MAX_ANCH   = 16;  // anchor-list entries
  localparam int unsigned ID_W       = $clog2(MAX_ANCH);
  localparam int unsigned A_W        = 16;  // matrix entry width
  localparam int unsigned B_W        = 26;  // right-hand-side entry width
  localparam int unsigned QUOT_W     = 10;  // back-substitution quotient width

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic        [COORD_W-1:0] coord_bits_t;  // coordinate bits inside structs
  typedef logic        [HOP_W-1:0]   hop_t;
  typedef logic        [ID_W-1:0]    anchor_id_t;

  // One anchor object of the anchor list. Struct fields are kept as plain bit
  // vectors (two's complement); users apply $signed() where they compute.
  typedef struct packed {
    coord_bits_t x;
    coord_bits_t y;
    coord_bits_t z;
    hop_t        r;
  } anchor_t;

  typedef enum logic [1:0] {
    PKT_FLOOD    = 2'd0,  // anchor position + hop count, relayed through the network
    PKT_POSITION = 2'd1,  // position computed by this node
    PKT_OTHER    = 2'd3
  } pkt_type_e;

  // Locationing packet exchanged with the data link layer.
  typedef struct packed {
    pkt_type_e  ptype;
    anchor_id_t id;
    coord_bits_t x;
    coord_bits_t y;
    coord_bits_t z;
    hop_t        hop;
  } loc_pkt_t;

  // One row of the matrix memory: [a0 a1 a2 | b], two's complement bits.
  typedef struct packed {
    logic [A_W-1:0] a0;
    logic [A_W-1:0] a1;
    logic [A_W-1:0] a2;
    logic [B_W-1:0] b;
  } mrow_t;

endpackage
