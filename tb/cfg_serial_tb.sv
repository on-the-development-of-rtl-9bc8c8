// cfg_serial_tb: shifts frames in MSB first, checks the parallel fields and
// strobes, and checks that a word returned one cycle after a read strobe
// leaves on sout MSB first starting at the second edge after the strobe.
// A small model memory stands in for the SRAM managers.
module cfg_serial_tb;
  logic        cfg_clk = 0, cfg_rst_n = 0, sin = 0, shift = 0, write = 0, read = 0, sout;
  logic [1:0]  tile_addr;
  logic [4:0]  word_addr;
  logic [15:0] wdata, rdata;
  logic        we, re;
  logic [15:0] mem [128];
  int checks = 0, failures = 0;

  cfg_serial #(.TAW(2)) dut (.cfg_clk(cfg_clk), .cfg_rst_n(cfg_rst_n), .sin(sin), .shift(shift),
    .write(write), .read(read), .sout(sout), .tile_addr(tile_addr), .word_addr(word_addr),
    .wdata(wdata), .we(we), .re(re), .rdata(rdata));

  always #5 cfg_clk = ~cfg_clk;

  // model SRAM: registered read, like the SRAM manager
  always_ff @(posedge cfg_clk) begin
    if (we) mem[{tile_addr, word_addr}] <= wdata;
    if (re) rdata <= mem[{tile_addr, word_addr}];
  end

  initial begin
    repeat (100000) @(posedge cfg_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [22:0] frame);
    for (int b = 22; b >= 0; b--) begin
      @(negedge cfg_clk); shift = 1; sin = frame[b];
    end
    @(negedge cfg_clk); shift = 0;
  endtask

  logic [22:0] f;
  logic [15:0] got;
  logic [15:0] ref_mem [128];
  initial begin
    for (int i = 0; i < 128; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    rdata = 0;
    #12 cfg_rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      f = 23'($urandom);
      send(f);
      checks++;
      if ({tile_addr, word_addr, wdata} !== f || we || re) begin
        failures++;
        $display("serial frame %h parsed as %h/%h/%h", f, tile_addr, word_addr, wdata);
      end
      write = 1; #1;
      checks++;
      if (!we) begin failures++; $display("we missing"); end
      ref_mem[f[22:16]] = f[15:0];
      @(negedge cfg_clk); write = 0;
    end
    for (int r = 0; r < 60; r++) begin
      f = 23'($urandom);
      send(f);
      read = 1;
      @(negedge cfg_clk); read = 0;
      @(negedge cfg_clk);          // word loaded into the output register
      for (int b = 15; b >= 0; b--) begin
        got[b] = sout;
        shift = 1;
        @(negedge cfg_clk);
      end
      shift = 0;
      checks++;
      if (got !== ref_mem[f[22:16]]) begin
        failures++;
        $display("readback addr %h: %h expected %h", f[22:16], got, ref_mem[f[22:16]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
