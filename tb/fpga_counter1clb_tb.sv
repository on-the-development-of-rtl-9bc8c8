// fpga_counter1clb_tb: the 4-bit counter packed into a single CLB, as on
// the one-cluster test chip, on the default 2 x 2 array.
//
// With the counter cleared by the fabric reset (rst_n, the BLE flip-flop
// reset) instead of a logic input, every next-state bit needs at most the
// four state bits, so one 4-LUT per bit suffices: BLE3 = q0, BLE2 = q1,
// BLE0 = q2, BLE1 = q3 of the CLB in tile (1,1), the bottom-right one. Its
// four outputs leave on all four CLB sides and reach the perimeter through
// the other tiles' connection and switch blocks:
//   q0: Out_3 -> vertical track 3 of tile (1,1) -> switch (1,1) T3->B3 -> edge_b_out[1][3]
//   q1: Out_2 -> horizontal track 2 of tile (1,1) -> switch (1,1) L2->R2 -> edge_r_out[1][2]
//   q2: Out_0 -> far pin of tile (1,0)'s horizontal block -> track 1 -> switch (1,0) L1->R1
//       -> edge_r_out[0][1]
//   q3: Out_1 -> far pin of tile (0,1)'s vertical block -> track 0 -> switch (0,1) T0->B0
//       -> edge_b_out[0][0]
// The counter is checked over several wrap-arounds and an asynchronous
// reset.
module fpga_counter1clb_tb;
  import fpga_bits_pkg::*;
  logic clk = 0, rst_n = 0, cfg_clk = 0, cfg_rst_n = 0;
  logic cfg_sin = 0, cfg_shift = 0, cfg_write = 0, cfg_read = 0, cfg_sout;
  logic [1:0][2:0]  io_top_in = '0;
  logic [1:0]       io_top_out, io_left_out;
  logic [1:0][1:0]  io_left_in = '0;
  logic [1:0][15:0] edge_l_in = '0, edge_t_in = '0, edge_r_in = '0, edge_b_in = '0;
  logic [1:0][15:0] edge_l_out, edge_t_out, edge_r_out, edge_b_out;
  int checks = 0, failures = 0;

  fpga_top dut (.*);

  always #5 clk = ~clk;
  always #2 cfg_clk = ~cfg_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tile_img_t img [4];

  // next-state tables; LUT input 0 is the bit itself, 1..3 the lower bits
  function automatic logic [15:0] tt_bit(input int n);
    logic [15:0] tt;
    for (int a = 0; a < 16; a++) begin
      logic carry = 1'b1;
      for (int j = 1; j <= n; j++) carry &= a[j];
      tt[a] = a[0] ^ carry;
    end
    return tt;
  endfunction

  task automatic shift_frame(input logic [22:0] f);
    for (int b = 22; b >= 0; b--) begin
      @(negedge cfg_clk); cfg_shift = 1; cfg_sin = f[b];
    end
    @(negedge cfg_clk); cfg_shift = 0;
  endtask

  task automatic cfg_write_word(input int t, input int a, input logic [15:0] d);
    shift_frame({2'(t), 5'(a), d});
    cfg_write = 1;
    @(negedge cfg_clk); cfg_write = 0;
  endtask

  logic [3:0] exp_cnt;
  int n_wraps = 0;

  task automatic check(input string what);
    logic [3:0] got;
    got = {edge_b_out[0][0], edge_r_out[0][1], edge_r_out[1][2], edge_b_out[1][3]};
    checks++;
    if (got !== exp_cnt) begin
      failures++;
      $display("%s: count %h expected %h", what, got, exp_cnt);
    end
  endtask

  initial begin
    bit ok = 1;
    for (int t = 0; t < 4; t++) img[t] = '0;
    // BLE b holds bit order[b]; source code of bit j is 10 + BLE holding it
    //   q0: BLE3 (13), q1: BLE2 (12), q2: BLE0 (10), q3: BLE1 (11)
    begin
      int ble_of [4] = '{3, 2, 0, 1};
      for (int n = 0; n < 4; n++) begin
        set_lut(img[3], ble_of[n], tt_bit(n));
        set_sel(img[3], ble_of[n], 0, 10 + ble_of[n]);
        for (int k = 1; k < 4; k++) set_sel(img[3], ble_of[n], k, (k <= n) ? 10 + ble_of[k-1] : 15);
        set_reg(img[3], ble_of[n]);
      end
    end
    ok &= set_cb(img[3], 1, 0, 3, 3);  set_sb(img[3], 5, 3, 1);   // q0
    ok &= set_cb(img[3], 0, 0, 2, 2);  set_sb(img[3], 4, 2, 1);   // q1
    ok &= set_cb(img[1], 0, 1, 3, 1);  set_sb(img[1], 4, 1, 1);   // q2
    ok &= set_cb(img[2], 1, 1, 2, 0);  set_sb(img[2], 5, 0, 1);   // q3
    checks++;
    if (!ok) begin failures++; $display("bitstream: unreachable track"); end

    #20 cfg_rst_n = 1;
    for (int t = 0; t < 4; t++) cfg_write_word(t, 8, img[t][8]);
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < 25; a++) if (a != 8) cfg_write_word(t, a, img[t][a]);

    @(negedge clk); rst_n = 1; exp_cnt = 0;
    #1 check("after reset");
    for (int i = 0; i < 50; i++) begin
      @(posedge clk); #1;
      exp_cnt++;
      if (exp_cnt == 0) n_wraps++;
      check("count");
    end
    #2 rst_n = 0; #1 exp_cnt = 0; check("async reset");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      exp_cnt++;
      check("count after reset");
    end
    checks++;
    if (n_wraps < 3) begin failures++; $display("counter never wrapped"); end
    $display("wraps=%0d", n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
