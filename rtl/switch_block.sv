// switch_block: Wilton switch block joining the four channel segments that
// meet at one corner of a tile.
//
// Every wire on a side meets exactly three wires, one on each other side,
// following the Wilton pattern (fpga_pkg::wilton_map). Each such meeting is
// a bidirectional switch built, as in the original design, from tri-state buffers:
// two buffers, one per direction, each with its own configuration bit. The
// buffers are modelled as a wired OR (see conn_block): this block outputs,
// per side, the OR of (enable & source wire) over the switches that drive
// that side, and reads back the resolved wire values.
//
// Configuration: for pair q (0 L-T, 1 T-R, 2 R-B, 3 B-L, 4 L-R, 5 T-B) and
// wire i on the pair's first side, bit 2*(q*W+i) drives the first side from
// the second and bit 2*(q*W+i)+1 drives the second side from the first.
// 6 pairs x 16 wires x 2 = 192 bits = 12 configuration words.
//
// A segment driven through a switch feeds back into the switch's other
// buffer, a structural combinational loop inherent in bidirectional routing;
// a bitstream that enables both directions of one switch latches the pair
// and is invalid.
module switch_block
  import fpga_pkg::*;
(
  input  logic [12*WORD_W-1:0] cfg,
  input  logic [3:0][W-1:0]   seg,   // resolved wires, indexed by side_e
  output logic [3:0][W-1:0]   drv    // this block's drive, indexed by side_e
);
  always_comb begin
    drv = '0;
    for (int q = 0; q < 6; q++)
      for (int i = 0; i < W; i++) begin
        drv[pair_a(q)][i] |= cfg[2*(q*W+i)] & seg[pair_b(q)][wilton_map(q, i)];
        drv[pair_b(q)][wilton_map(q, i)] |= cfg[2*(q*W+i)+1] & seg[pair_a(q)][i];
      end
  end
endmodule
