// cfg_decoder_tb: every tile address, with the enable low and high,
// including addresses beyond the last tile.
module cfg_decoder_tb;
  logic       en;
  logic [2:0] tile_addr;
  logic [5:0] tile_sel;
  int checks = 0, failures = 0;

  cfg_decoder #(.NTILES(6), .TAW(3)) dut (.en(en), .tile_addr(tile_addr), .tile_sel(tile_sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 8; a++) begin
        logic [5:0] exp;
        en = e[0]; tile_addr = 3'(a);
        exp = '0;
        if (e == 1 && a < 6) exp[a] = 1'b1;
        #1;
        checks++;
        if (tile_sel !== exp) begin
          failures++;
          $display("decoder en=%0d addr=%0d sel=%b expected %b", e, a, tile_sel, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
