// clb_tb: random cluster configurations against a reference model.
// Phase 1: all BLEs combinational, LUT inputs chosen only among cluster
// inputs and the constant code (no feedback), checked after each input
// change. Phase 2: all BLEs registered, LUT inputs chosen among all 16
// select codes including BLE feedback; the model steps a 4-bit state per
// clock and the outputs are compared every cycle.
module clb_tb;
  logic                       clk = 0, rst_n = 0;
  logic [3:0][15:0]           cfg_tt;
  logic [3:0][3:0][3:0]       cfg_sel;
  logic [3:0]                 cfg_reg;
  logic [9:0]                 in;
  logic [3:0]                 out;
  int checks = 0, failures = 0;

  clb dut (.clk(clk), .rst_n(rst_n), .cfg_tt(cfg_tt), .cfg_sel(cfg_sel), .cfg_reg(cfg_reg),
           .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: value of source code s given inputs and BLE outputs
  function automatic logic src(input logic [3:0] s, input logic [9:0] i, input logic [3:0] q);
    if (s < 10)      return i[s];
    else if (s < 14) return q[s-10];
    else             return 1'b0;
  endfunction

  function automatic logic [3:0] model(input logic [9:0] i, input logic [3:0] q);
    logic [3:0] r;
    for (int b = 0; b < 4; b++) begin
      logic [3:0] a;
      for (int k = 0; k < 4; k++) a[k] = src(cfg_sel[b][k], i, q);
      r[b] = cfg_tt[b][a];
    end
    return r;
  endfunction

  logic [3:0] state;
  initial begin
    in = '0; cfg_tt = '0; cfg_sel = '0; cfg_reg = '0;
    #12 rst_n = 1;
    // phase 1: combinational
    for (int c = 0; c < 50; c++) begin
      for (int b = 0; b < 4; b++) begin
        cfg_tt[b] = 16'($urandom);
        for (int k = 0; k < 4; k++) begin
          int s = $urandom_range(0, 11);
          cfg_sel[b][k] = (s >= 10) ? 4'(14 + s - 10) : 4'(s);
        end
      end
      for (int v = 0; v < 20; v++) begin
        in = 10'($urandom);
        #1 checks++;
        if (out !== model(in, 4'b0)) begin
          failures++;
          $display("clb comb: out=%b expected %b", out, model(in, 4'b0));
        end
      end
    end
    // phase 2: registered with feedback
    cfg_reg = 4'hF;
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      rst_n = 0; #1 rst_n = 1;
      state = '0;
      for (int b = 0; b < 4; b++) begin
        cfg_tt[b] = 16'($urandom);
        for (int k = 0; k < 4; k++) cfg_sel[b][k] = 4'($urandom);
      end
      for (int v = 0; v < 30; v++) begin
        in = 10'($urandom);
        checks++;
        if (out !== state) begin
          failures++;
          $display("clb reg: out=%b expected %b", out, state);
        end
        state = model(in, state);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
