// ble_tb: checks the BLE in combinational mode (output follows the LUT),
// in registered mode (output is the LUT value sampled at the previous rising
// edge, i.e. one cycle of latency) and the asynchronous reset.
module ble_tb;
  logic        clk = 0, rst_n = 0, registered = 0;
  logic [15:0] tt;
  logic [3:0]  in;
  logic        out;
  int checks = 0, failures = 0;

  ble dut (.clk(clk), .rst_n(rst_n), .tt(tt), .registered(registered), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("ble %s: got %b expected %b (tt=%h in=%h)", what, out, exp, tt, in);
    end
  endtask

  logic exp_q;
  initial begin
    tt = 16'hFFFF; in = 0;
    #12 registered = 1; #1;
    check(1'b0, "reset");
    rst_n = 1;
    // combinational mode
    registered = 0;
    for (int r = 0; r < 100; r++) begin
      tt = 16'($urandom); in = 4'($urandom);
      #1 check(tt[in], "comb");
    end
    // registered mode
    registered = 1;
    @(negedge clk);
    for (int r = 0; r < 200; r++) begin
      tt = 16'($urandom); in = 4'($urandom);
      exp_q = tt[in];
      @(posedge clk); #1;
      in = ~in;              // changing inputs must not reach the output
      #1 check(exp_q, "registered");
      @(negedge clk);
    end
    // asynchronous reset in the middle of a cycle
    tt = 16'hFFFF;
    @(posedge clk); #1 check(1'b1, "before reset");
    #2 rst_n = 0; #1 check(1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
