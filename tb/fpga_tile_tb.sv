// fpga_tile_tb: one tile with its surroundings played by the testbench.
// The tile is configured through its SRAM-manager port, read back, and then
// exercised on paths that cross every part of it:
//  * BLE3 = In_0 ^ In_1 ^ In_2, combinational, In_1 from vertical track 4,
//    In_2 from horizontal track 8, output Out_3 onto vertical track 3;
//  * BLE0 = registered AND of In_0 and In_8 (top pins), seen on top_out;
//  * switch block: horizontal (left-side) track 2 drives vertical track 14,
//    and the right-side track 1 drives the bottom-side track 13 (Wilton
//    R-B pairing 30-1 mod 16);
//  * far pins: the right neighbour's In_3 reads vertical track 14, its Out_1
//    drives vertical track 0; the lower neighbour's Out_0 drives horizontal
//    track 5 and its In_4 reads horizontal track 3.
module fpga_tile_tb;
  import fpga_bits_pkg::*;
  logic        clk = 0, rst_n = 0, cfg_clk = 0, cfg_rst_n = 0;
  logic        cfg_sel = 0, cfg_we = 0, cfg_re = 0;
  logic [4:0]  cfg_addr = 0;
  logic [15:0] cfg_wdata = 0, cfg_rdata;
  logic [2:0]  top_in = 0, far_h_in;
  logic [1:0]  left_in = 0, far_v_in;
  logic        top_out, left_out, far_h_out = 0, far_v_out = 0;
  logic [15:0] h_seg, h_drv, v_seg, v_drv, sbr_seg, sbr_drv, sbb_seg, sbb_drv;
  logic [15:0] h_ext = 0, v_ext = 0, r_ext = 0, b_ext = 0;
  int checks = 0, failures = 0;

  fpga_tile dut (.*);

  // the tile's four segments are resolved here, with outside drive ORed in
  assign h_seg   = h_drv | h_ext;
  assign v_seg   = v_drv | v_ext;
  assign sbr_seg = sbr_drv | r_ext;
  assign sbb_seg = sbb_drv | b_ext;

  always #5 clk = ~clk;
  always #3 cfg_clk = ~cfg_clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("tile %s: got %b expected %b", what, got, exp);
    end
  endtask

  tile_img_t img;
  initial begin
    img = '0;
    // BLE3: In_0 ^ In_1 ^ In_2 (inputs 0,1,2 of the LUT), input 3 constant 0
    set_lut(img, 3, 16'h9696);
    set_sel(img, 3, 0, 0); set_sel(img, 3, 1, 1); set_sel(img, 3, 2, 2); set_sel(img, 3, 3, 15);
    void'(set_cb(img, 1, 0, 0, 4));    // In_1 (right pin 0) <- v track 4
    void'(set_cb(img, 0, 0, 0, 8));    // In_2 (bottom pin 0) <- h track 8
    void'(set_cb(img, 1, 0, 3, 3));    // Out_3 (right pin 3) -> v track 3
    // BLE0: In_0 & In_8, registered
    set_lut(img, 0, 16'h8888);
    set_sel(img, 0, 0, 0); set_sel(img, 0, 1, 8); set_sel(img, 0, 2, 14); set_sel(img, 0, 3, 14);
    set_reg(img, 0);
    // switch block
    set_sb(img, 0, 2, 1);              // L2 -> T14
    set_sb(img, 2, 1, 1);              // R1 -> B13
    // far pins
    void'(set_cb(img, 1, 1, 0, 14));   // right tile In_3 <- v track 14
    void'(set_cb(img, 1, 1, 2, 0));    // right tile Out_1 -> v track 0
    void'(set_cb(img, 0, 1, 3, 5));    // lower tile Out_0 -> h track 5
    void'(set_cb(img, 0, 1, 1, 3));    // lower tile In_4 <- h track 3

    #20 cfg_rst_n = 1; rst_n = 1;
    // program
    for (int a = 0; a < 25; a++) begin
      @(negedge cfg_clk);
      cfg_sel = 1; cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = img[a];
    end
    @(negedge cfg_clk); cfg_we = 0;
    // read back
    for (int a = 0; a < 25; a++) begin
      @(negedge cfg_clk); cfg_re = 1; cfg_addr = 5'(a);
      @(negedge cfg_clk); cfg_re = 0;
      checks++;
      if (cfg_rdata !== img[a]) begin
        failures++;
        $display("tile readback word %0d: %h expected %h", a, cfg_rdata, img[a]);
      end
    end
    cfg_sel = 0;

    // combinational XOR path through both connection blocks
    for (int v = 0; v < 8; v++) begin
      top_in[0] = v[0]; v_ext = 16'(v[1]) << 4; h_ext = 16'(v[2]) << 8;
      #1 chk(v_seg[3], v[0] ^ v[1] ^ v[2], "BLE3 xor to v track 3");
      chk(v_drv[3], v[0] ^ v[1] ^ v[2], "tile drives v track 3");
    end
    v_ext = 0; h_ext = 0;
    // registered AND on top_out
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      top_in[0] = v[0]; top_in[2] = v[1];
      @(posedge clk); #1;
      top_in = 0;
      #1 chk(top_out, v[0] & v[1], "BLE0 registered and");
    end
    // switch block
    for (int v = 0; v < 2; v++) begin
      h_ext = 16'(v) << 2; r_ext = 16'(v) << 1;
      #1 chk(v_drv[14], v[0], "SB L2->T14");
      chk(far_v_in[0], v[0], "right tile In_3 via T14");
      chk(sbb_drv[13], v[0], "SB R1->B13");
      checks++;
      if ((sbr_drv | (v_drv & ~16'h4000) | (sbb_drv & ~16'h2000)) !== 16'h0008 * 16'(v_seg[3])) begin
        failures++;
        $display("tile: unexpected drive sbr=%h v=%h sbb=%h", sbr_drv, v_drv, sbb_drv);
      end
    end
    h_ext = 0; r_ext = 0;
    // far output pins
    for (int v = 0; v < 2; v++) begin
      far_v_out = v[0]; far_h_out = ~v[0]; h_ext = 16'(v) << 3;
      #1 chk(v_drv[0], v[0], "right tile Out_1 -> v track 0");
      chk(h_drv[5], ~v[0], "lower tile Out_0 -> h track 5");
      chk(far_h_in[1], v[0], "lower tile In_4 <- h track 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
