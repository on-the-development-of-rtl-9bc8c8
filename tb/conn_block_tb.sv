// conn_block_tb: random switch configurations and track values. The
// expected pin and track values are built from an explicit tap table:
// near pin p taps tracks p, p+4, p+8, p+12; far pin p taps
// (p+2) mod 4 + 4k. Configurations obey the one-driver rule.
module conn_block_tb;
  logic [31:0] cfg;
  logic [15:0] trk, drv;
  logic [2:0]  near_in;
  logic        near_out;
  logic [1:0]  far_in;
  logic        far_out;
  int checks = 0, failures = 0;

  conn_block #(.NNI(3), .NFI(2)) dut (.cfg(cfg), .trk(trk), .drv(drv), .near_in(near_in),
    .near_out(near_out), .far_in(far_in), .far_out(far_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap(input bit far, input int p, input int k);
    int cls = far ? (p + 2) % 4 : p;
    return cls + 4 * k;
  endfunction

  initial begin
    for (int r = 0; r < 2000; r++) begin
      logic [2:0]  en_ni;
      logic [1:0]  en_fi;
      logic [2:0]  exp_ni;
      logic [1:0]  exp_fi;
      logic [15:0] exp_drv;
      int kk [5];
      cfg = '0;
      trk = 16'($urandom); near_out = 1'($urandom); far_out = 1'($urandom);
      // each pin: either no switch or one random tap
      for (int p = 0; p < 4; p++) begin
        kk[p] = $urandom_range(0, 4);  // 4 = none
        if (kk[p] < 4) cfg[p*4 + kk[p]] = 1'b1;
      end
      for (int p = 0; p < 3; p++) begin
        int k2 = $urandom_range(0, 4);
        if (k2 < 4) cfg[16 + p*4 + k2] = 1'b1;
      end
      exp_ni = '0; exp_fi = '0; exp_drv = '0;
      for (int p = 0; p < 3; p++)
        for (int k = 0; k < 4; k++) if (cfg[p*4+k]) exp_ni[p] = trk[tap(0, p, k)];
      for (int p = 0; p < 2; p++)
        for (int k = 0; k < 4; k++) if (cfg[16+p*4+k]) exp_fi[p] = trk[tap(1, p, k)];
      for (int k = 0; k < 4; k++) begin
        if (cfg[12+k]) exp_drv[tap(0, 3, k)] |= near_out;
        if (cfg[24+k]) exp_drv[tap(1, 2, k)] |= far_out;
      end
      #1;
      checks++;
      if (near_in !== exp_ni || far_in !== exp_fi || drv !== exp_drv) begin
        failures++;
        $display("cb: cfg=%h trk=%h ni=%b/%b fi=%b/%b drv=%h/%h", cfg, trk, near_in, exp_ni,
                 far_in, exp_fi, drv, exp_drv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
