// ble: basic logic element.
//
// A 4-input LUT followed by a D flip-flop with asynchronous active-low
// reset, and a 2:1 output multiplexer that selects either the LUT output
// (combinational) or the flip-flop output (registered) under one
// configuration bit. This is the original architecture's BLE; the reset polarity is
// this design's choice. The flip-flop captures on the rising clock edge.
module ble #(
  parameter int unsigned K = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [(1<<K)-1:0] tt,          // LUT truth table (configuration)
  input  logic              registered,  // 1: output the flip-flop (configuration)
  input  logic [K-1:0]      in,
  output logic              out
);
  logic lut_out, q;

  lut4 #(.K(K)) u_lut (.tt(tt), .in(in), .out(lut_out));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= lut_out;

  assign out = registered ? q : lut_out;
endmodule
