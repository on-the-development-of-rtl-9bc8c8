// lut4_tb: drives random truth tables through all 16 input combinations of
// the 4-input LUT and compares the output with the addressed truth-table bit.
module lut4_tb;
  logic [15:0] tt;
  logic [3:0]  in;
  logic        out;
  int checks = 0, failures = 0;

  lut4 dut (.tt(tt), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      tt = (r == 0) ? 16'h8000 : (r == 1) ? 16'h6996 : 16'($urandom);
      for (int v = 0; v < 16; v++) begin
        in = 4'(v);
        #1;
        checks++;
        if (out !== ((tt >> v) & 1)) begin
          failures++;
          $display("lut4 mismatch tt=%h in=%h out=%b", tt, in, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
