// cfg_decoder: outer configuration decoder.
//
// Drives the global word line of exactly one tile's SRAM manager: the tile
// whose index equals 'tile_addr', while 'en' is high. Indices at or above
// NTILES select nothing. Purely combinational.
module cfg_decoder #(
  parameter int unsigned NTILES = 4,
  parameter int unsigned TAW    = (NTILES > 1) ? $clog2(NTILES) : 1
) (
  input  logic              en,
  input  logic [TAW-1:0]    tile_addr,
  output logic [NTILES-1:0] tile_sel
);
  always_comb
    for (int t = 0; t < NTILES; t++)
      tile_sel[t] = en && (int'(tile_addr) == t);
endmodule
