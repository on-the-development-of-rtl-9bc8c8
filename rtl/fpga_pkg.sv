// fpga_pkg: constants shared by the island-style FPGA fabric.
//
// The architecture numbers follow the original design: 4-input LUTs, 4 BLEs per
// cluster, 10 cluster inputs and 4 outputs, 16-track channels, a connection
// block flexibility of 25 % (4 of 16 tracks per pin), a Wilton switch block
// where every wire meets three others, and 16-bit configuration words (one
// 4-LUT truth table per word). The per-tile word map, the select encoding,
// the Wilton permutation and the connection-block tap pattern are this
// design's own choices; they are laid out here so that
// every module and testbench agrees on them.
package fpga_pkg;

  // Architecture
  localparam int unsigned K      = 4;   // LUT inputs
  localparam int unsigned N      = 4;   // BLEs per CLB
  localparam int unsigned I      = 10;  // CLB inputs
  localparam int unsigned W      = 16;  // tracks per routing channel
  localparam int unsigned FC     = 4;   // tracks reachable per CLB pin (25 % of W)
  localparam int unsigned WORD_W = 16;  // configuration word width

  // Input-mux select encoding: 0..I-1 pick CLB input i, I..I+N-1 pick BLE
  // output (sel-I), anything above picks constant 0.
  localparam int unsigned SEL_W = 4;

  // Per-tile configuration word map
  localparam int unsigned A_LUT    = 0;   // 0..3   LUT truth table of BLE b
  localparam int unsigned A_IMUX   = 4;   // 4..7   input-mux selects of BLE b, 4 bits per LUT input
  localparam int unsigned A_REG    = 8;   // 8      bit b: BLE b output registered
  localparam int unsigned A_CBV    = 9;   // 9..10  connection block on the vertical (right) channel
  localparam int unsigned A_CBH    = 11;  // 11..12 connection block on the horizontal (bottom) channel
  localparam int unsigned A_SB     = 13;  // 13..24 switch block
  localparam int unsigned CB_BITS  = 2 * WORD_W;           // 28 used
  localparam int unsigned SB_BITS  = 12 * WORD_W;          // 6 side pairs x W wires x 2 directions
  localparam int unsigned N_WORDS  = 25;
  localparam int unsigned WADDR_W  = 5;

  // Switch block sides
  typedef enum logic [1:0] {SIDE_L = 2'd0, SIDE_T = 2'd1, SIDE_R = 2'd2, SIDE_B = 2'd3} side_e;

  // Wilton pairing (as defined in the routing literature): wire i on side
  // 'a' meets wire wilton_map(pair, i) on side 'b'. Pairs, in switch-block
  // bit order: 0 L-T, 1 T-R, 2 R-B, 3 B-L, 4 L-R, 5 T-B.
  function automatic int unsigned wilton_map(input int unsigned pair, input int unsigned i);
    case (pair)
      0: return (W - i) % W;           // left i   <-> top (W-i)
      1: return (i + 1) % W;           // top i    <-> right i+1
      2: return (2 * W - 2 - i) % W;   // right i  <-> bottom 2W-2-i
      3: return (i + 1) % W;           // bottom i <-> left i+1
      default: return i;               // straight through
    endcase
  endfunction

  function automatic side_e pair_a(input int unsigned pair);
    case (pair)
      0: return SIDE_L;
      1: return SIDE_T;
      2: return SIDE_R;
      3: return SIDE_B;
      4: return SIDE_L;
      default: return SIDE_T;
    endcase
  endfunction

  function automatic side_e pair_b(input int unsigned pair);
    case (pair)
      0: return SIDE_T;
      1: return SIDE_R;
      2: return SIDE_B;
      3: return SIDE_L;
      4: return SIDE_R;
      default: return SIDE_B;
    endcase
  endfunction

  // Connection block: the pin at position p on the CLB side facing the
  // channel ("near" side) taps tracks p, p+4, p+8, p+12; a pin of the CLB on
  // the other side of the channel ("far" side) taps the class shifted by 2.
  function automatic int unsigned cb_track(input bit far, input int unsigned p,
                                           input int unsigned k);
    return ((p + (far ? 2 : 0)) % FC) + FC * k;
  endfunction

endpackage
