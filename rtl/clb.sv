// clb: configurable logic block, a fully connected cluster of N BLEs.
//
// Every LUT input of every BLE has its own input multiplexer that can pick
// any of the I cluster inputs or any of the N BLE outputs (local feedback),
// so any cluster input or output can reach any LUT input. With K=4, N=4 and
// I=10 each multiplexer has 14 sources and a 4-bit select, so the selects of
// one BLE fill exactly one 16-bit configuration word, as do its truth table.
// Select values I..I+N-1 pick BLE output (sel-I); the two unused codes give
// constant 0 (this encoding is this design's choice). BLE b drives cluster
// output b. All BLEs share the clock and asynchronous reset.
//
// The feedback path BLE output -> input mux -> LUT is a structural
// combinational loop, as in any cluster with local feedback; it only closes
// electrically when a configuration routes a combinational BLE back to
// itself, which a valid bitstream does not do.
module clb
  import fpga_pkg::*;
#(
  parameter int unsigned NB  = N,
  parameter int unsigned NI  = I,
  parameter int unsigned KL  = K,
  parameter int unsigned SW  = SEL_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NB-1:0][(1<<KL)-1:0]      cfg_tt,   // truth table per BLE
  input  logic [NB-1:0][KL-1:0][SW-1:0]   cfg_sel,  // input-mux select per LUT input
  input  logic [NB-1:0]                   cfg_reg,  // registered output per BLE
  input  logic [NI-1:0]                   in,
  output logic [NB-1:0]                   out
);
  logic [NB-1:0][KL-1:0] lut_in;
  logic [NI+NB-1:0]      src;

  assign src = {out, in};

  always_comb
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < KL; k++)
        lut_in[b][k] = (int'(cfg_sel[b][k]) < NI + NB) ? src[cfg_sel[b][k]] : 1'b0;

  for (genvar b = 0; b < NB; b++) begin : g_ble
    ble #(.K(KL)) u_ble (
      .clk(clk), .rst_n(rst_n),
      .tt(cfg_tt[b]), .registered(cfg_reg[b]),
      .in(lut_in[b]), .out(out[b])
    );
  end
endmodule
