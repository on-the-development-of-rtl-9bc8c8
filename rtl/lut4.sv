// lut4: K-input look-up table.
//
// The 2^K configuration bits are the truth table; the K logic inputs are the
// select lines of a binary multiplexer tree (the transmission-gate tree of
// the original circuit becomes a tree of 2:1 muxes here). Input in[0] steers
// the first level, so truth-table bit index = {in[K-1], ..., in[0]}.
// Purely combinational.
module lut4 #(
  parameter int unsigned K = 4
) (
  input  logic [(1<<K)-1:0] tt,   // truth table (configuration)
  input  logic [K-1:0]      in,   // logic inputs
  output logic              out
);
  // level l holds 2^(K-l) nodes; level 0 is the truth table itself
  logic [(1<<K)-1:0] lvl [K+1];

  always_comb begin
    lvl[0] = tt;
    for (int l = 1; l <= K; l++) begin
      lvl[l] = '0;
      for (int n = 0; n < (1 << (K - l)); n++)
        lvl[l][n] = in[l-1] ? lvl[l-1][2*n+1] : lvl[l-1][2*n];
    end
    out = lvl[K][0];
  end
endmodule
