// sram_manager_tb: writes random words (with the tile's word line high and
// low), checks the parallel configuration output against a model memory,
// and reads every word back, checking the one-cycle read latency.
module sram_manager_tb;
  logic         cfg_clk = 0, cfg_rst_n = 0, sel = 0, we = 0, re = 0;
  logic [4:0]   addr = 0;
  logic [15:0]  wdata = 0, rdata;
  logic [399:0] cfg;
  logic [24:0][15:0] model;
  int checks = 0, failures = 0;

  sram_manager dut (.cfg_clk(cfg_clk), .cfg_rst_n(cfg_rst_n), .sel(sel), .we(we), .re(re),
                    .addr(addr), .wdata(wdata), .rdata(rdata), .cfg(cfg));

  always #5 cfg_clk = ~cfg_clk;

  initial begin
    repeat (20000) @(posedge cfg_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 cfg_rst_n = 1;
    checks++;
    if (cfg !== '0) begin failures++; $display("sram not cleared by reset"); end
    for (int r = 0; r < 400; r++) begin
      @(negedge cfg_clk);
      sel = ($urandom_range(0, 3) != 0);
      we = 1; re = 0;
      addr = 5'($urandom_range(0, 31));
      wdata = 16'($urandom);
      if (sel && addr < 25) model[addr] = wdata;
      @(negedge cfg_clk);
      we = 0;
      checks++;
      if (cfg !== model) begin failures++; $display("sram cfg mismatch after write %0d", r); end
    end
    // read back
    for (int a = 0; a < 32; a++) begin
      @(negedge cfg_clk);
      sel = 1; re = 1; addr = 5'(a);
      @(negedge cfg_clk);
      re = 0;
      checks++;
      if (rdata !== ((a < 25) ? model[a] : 16'h0)) begin
        failures++;
        $display("sram read %0d: %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
