// conn_block: connection block between one routing channel and the CLB pins
// on both sides of it.
//
// Each CLB pin reaches FC = 4 of the W = 16 tracks (25 % of the channel)
// through switches that each have one configuration bit. An input pin's
// switches drive the pin from a track; an output pin's switches drive
// tracks from the pin. The tri-state buffers of the original circuit are
// modelled as a wired OR: a switch contributes (enable & value) and a track
// carries the OR of every contribution made to it (this module's 'drv'
// output is its share; the surrounding array ORs the shares). A correct
// bitstream enables at most one driver per track and per input pin, which
// makes this equal to the tri-state bus; an input pin with no enabled
// switch reads 0.
//
// "near" pins belong to the CLB of the same tile, the pins facing the
// channel; "far" pins belong to the CLB on the other side of the channel.
// On each side the input pins come first and the single output pin last.
// Pin p taps tracks given by fpga_pkg::cb_track (every fourth track, the far
// side shifted by two classes); that pattern is this design's choice.
// Configuration: bit p*FC+k of word 0 enables tap k of near pin p, bit
// p*FC+k of word 1 the same for far pin p. Purely combinational.
// Only the tracks an output pin can reach (two classes of four) are ever
// driven, so the other 'drv' bits are constant 0 by construction. Inside
// the array the block sits on routing loops (pin -> CLB -> pin, track ->
// switch block -> track); a valid configuration never closes them.
module conn_block
  import fpga_pkg::*;
#(
  parameter int unsigned NNI = 3,   // near input pins
  parameter int unsigned NFI = 2    // far input pins
) (
  input  logic [2*WORD_W-1:0] cfg,
  input  logic [W-1:0]       trk,        // resolved track values
  output logic [W-1:0]       drv,        // this block's drive onto the tracks
  output logic [NNI-1:0]      near_in,    // to near CLB input pins
  input  logic                near_out,   // from near CLB output pin
  output logic [NFI-1:0]      far_in,     // to far CLB input pins
  input  logic                far_out     // from far CLB output pin
);
  always_comb begin
    drv     = '0;
    near_in = '0;
    far_in  = '0;
    for (int k = 0; k < FC; k++) begin
      for (int p = 0; p < NNI; p++)
        near_in[p] |= cfg[p*FC+k] & trk[cb_track(1'b0, p, k)];
      for (int p = 0; p < NFI; p++)
        far_in[p] |= cfg[WORD_W+p*FC+k] & trk[cb_track(1'b1, p, k)];
      drv[cb_track(1'b0, NNI, k)] |= cfg[NNI*FC+k] & near_out;
      drv[cb_track(1'b1, NFI, k)] |= cfg[WORD_W+NFI*FC+k] & far_out;
    end
  end

  // the one-driver-per-track and one-tap-per-pin rules are asserted in
  // fpga_tile, which sees this block together with the switch block
endmodule
