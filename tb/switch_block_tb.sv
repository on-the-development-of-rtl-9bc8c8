// switch_block_tb: enables one switch buffer at a time and checks that the
// driven wire, and only it, follows the source wire (sides L, T, R, B; the
// Wilton pairing is written out here from its definition); then checks
// random sets of switches against the OR of the enabled sources.
module switch_block_tb;
  logic [191:0]     cfg;
  logic [3:0][15:0] seg, drv;
  int checks = 0, failures = 0;

  switch_block dut (.cfg(cfg), .seg(seg), .drv(drv));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pair q: sides (a,b) and partner of wire i
  function automatic void pair(input int q, input int i, output int a, output int b, output int j);
    case (q)
      0: begin a = 0; b = 1; j = (16 - i) % 16;  end   // L-T
      1: begin a = 1; b = 2; j = (i + 1) % 16;   end   // T-R
      2: begin a = 2; b = 3; j = (30 - i) % 16;  end   // R-B
      3: begin a = 3; b = 0; j = (i + 1) % 16;   end   // B-L
      4: begin a = 0; b = 2; j = i;              end   // L-R
      default: begin a = 1; b = 3; j = i;        end   // T-B
    endcase
  endfunction

  logic [3:0][15:0] exp;
  initial begin
    int a, b, j;
    // single buffers, both directions
    for (int q = 0; q < 6; q++)
      for (int i = 0; i < 16; i++)
        for (int d = 0; d < 2; d++) begin
          pair(q, i, a, b, j);
          cfg = '0;
          cfg[2*(q*16+i)+d] = 1'b1;
          for (int v = 0; v < 2; v++) begin
            seg = '0;
            exp = '0;
            if (d == 0) begin seg[b][j] = v[0]; exp[a][i] = v[0]; end
            else        begin seg[a][i] = v[0]; exp[b][j] = v[0]; end
            #1 checks++;
            if (drv !== exp) begin
              failures++;
              $display("sb single q=%0d i=%0d d=%0d v=%0d drv=%h", q, i, d, v, drv);
            end
          end
        end
    // random sets
    for (int r = 0; r < 500; r++) begin
      for (int w = 0; w < 6; w++) cfg[w*32 +: 32] = $urandom & $urandom;
      seg = {$urandom, $urandom};
      exp = '0;
      for (int q = 0; q < 6; q++)
        for (int i = 0; i < 16; i++) begin
          pair(q, i, a, b, j);
          if (cfg[2*(q*16+i)])   exp[a][i] |= seg[b][j];
          if (cfg[2*(q*16+i)+1]) exp[b][j] |= seg[a][i];
        end
      #1 checks++;
      if (drv !== exp) begin
        failures++;
        $display("sb random r=%0d drv=%h exp=%h", r, drv, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
