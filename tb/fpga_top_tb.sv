// fpga_top_tb: end-to-end test of the 2 x 2 array at its default size.
//
// A 4-bit up counter with synchronous reset (the test circuit used for the
// original chip) is placed and routed by hand onto two CLBs and loaded
// through the serial configuration port:
//   tile (0,0), CLB A: BLE3 = q0, BLE2 = q1, BLE0 = q2, BLE1 = q3, all
//     registered; reset enters on A.In_0 from the top perimeter;
//   tile (1,0), CLB B: BLE1 = c = q0 & q1, combinational, the carry into q3.
// Routes:
//   q0: A.Out_3 -> vertical channel track 3 -> B.In_7 (one connection block);
//   q1: A.Out_2 -> horizontal track 2 -> switch block (L2 -> T14) ->
//       vertical track 14 -> B.In_3 (through the switch block);
//   c : B.Out_1 -> vertical track 0 -> A.In_1 (back between clusters).
// Observed: q2 on io_top_out[0], q3 on io_left_out[0], q0/q1/c on the open
// top ends of the vertical segment (edge_t_out[0][3], [14], [0]) and q1 on
// the open left end of the horizontal segment (edge_l_out[0][2]).
// All four tiles' 100 words are then read back serially and compared.
// The counter runs through wrap-around, a synchronous user reset and an
// asynchronous fabric reset, and every mechanism is counted.
module fpga_top_tb;
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
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bitstream ----------------
  tile_img_t img [4];

  // truth table of a function of the LUT input index
  function automatic logic [15:0] tt_of(input int which);
    logic [15:0] tt;
    for (int a = 0; a < 16; a++) begin
      logic r, x1, x2, x3;
      r = a[0]; x1 = a[1]; x2 = a[2]; x3 = a[3];
      case (which)
        0: tt[a] = !r && !x1;                  // q0' = ~q0
        1: tt[a] = !r && (x1 ^ x2);            // q1' = q1 ^ q0
        2: tt[a] = !r && (x1 ^ (x2 && x3));    // q2' = q2 ^ q1 q0 ;  q3' = q3 ^ q2 c
        default: tt[a] = r && x1;              // c = In_3 & In_7
      endcase
    end
    return tt;
  endfunction

  task automatic build();
    bit ok = 1;
    for (int t = 0; t < 4; t++) img[t] = '0;
    // CLB A
    set_lut(img[0], 3, tt_of(0)); set_sel(img[0], 3, 0, 0); set_sel(img[0], 3, 1, 13);
    set_sel(img[0], 3, 2, 15); set_sel(img[0], 3, 3, 15);
    set_lut(img[0], 2, tt_of(1)); set_sel(img[0], 2, 0, 0); set_sel(img[0], 2, 1, 12);
    set_sel(img[0], 2, 2, 13); set_sel(img[0], 2, 3, 15);
    set_lut(img[0], 0, tt_of(2)); set_sel(img[0], 0, 0, 0); set_sel(img[0], 0, 1, 10);
    set_sel(img[0], 0, 2, 12); set_sel(img[0], 0, 3, 13);
    set_lut(img[0], 1, tt_of(2)); set_sel(img[0], 1, 0, 0); set_sel(img[0], 1, 1, 11);
    set_sel(img[0], 1, 2, 10); set_sel(img[0], 1, 3, 1);
    for (int b = 0; b < 4; b++) set_reg(img[0], b);
    // CLB B: BLE1 = In_3 & In_7
    set_lut(img[1], 1, tt_of(3)); set_sel(img[1], 1, 0, 3); set_sel(img[1], 1, 1, 7);
    set_sel(img[1], 1, 2, 15); set_sel(img[1], 1, 3, 15);
    // routing, all in tile (0,0)
    ok &= set_cb(img[0], 1, 0, 3, 3);   // A.Out_3 -> V3
    ok &= set_cb(img[0], 1, 1, 1, 3);   // V3 -> B.In_7
    ok &= set_cb(img[0], 0, 0, 2, 2);   // A.Out_2 -> H2
    set_sb(img[0], 0, 2, 1);            // H2 (left) -> V14 (top)
    ok &= set_cb(img[0], 1, 1, 0, 14);  // V14 -> B.In_3
    ok &= set_cb(img[0], 1, 1, 2, 0);   // B.Out_1 -> V0
    ok &= set_cb(img[0], 1, 0, 0, 0);   // V0 -> A.In_1
    checks++;
    if (!ok) begin failures++; $display("bitstream: unreachable track"); end
  endtask

  // ---------------- serial configuration ----------------
  int n_writes = 0, n_readbacks = 0;

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
    n_writes++;
  endtask

  task automatic cfg_read_word(input int t, input int a, output logic [15:0] d);
    shift_frame({2'(t), 5'(a), 16'h0});
    cfg_read = 1;
    @(negedge cfg_clk); cfg_read = 0;
    @(negedge cfg_clk);
    for (int b = 15; b >= 0; b--) begin
      d[b] = cfg_sout;
      cfg_shift = 1;
      @(negedge cfg_clk);
    end
    cfg_shift = 0;
  endtask

  // ---------------- counter checking ----------------
  int n_wraps = 0, n_user_resets = 0, n_async_resets = 0, n_carry = 0, n_sb_path = 0;
  int n_cb_path = 0, n_counts = 0;
  logic [3:0] exp_cnt;

  function automatic logic [3:0] observed();
    return {io_left_out[0], io_top_out[0], edge_l_out[0][2], edge_t_out[0][3]};
  endfunction

  task automatic check_cycle(input string what);
    checks++;
    if (observed() !== exp_cnt) begin
      failures++;
      $display("%s: count %h expected %h", what, observed(), exp_cnt);
    end
    checks++;
    if (edge_t_out[0][14] !== exp_cnt[1] || edge_t_out[0][0] !== (exp_cnt[0] & exp_cnt[1])) begin
      failures++;
      $display("%s: routed q1=%b carry=%b for count %h", what, edge_t_out[0][14], edge_t_out[0][0],
               exp_cnt);
    end
    if (exp_cnt[0]) n_cb_path++;
    if (exp_cnt[1]) n_sb_path++;
    if (exp_cnt[0] & exp_cnt[1]) n_carry++;
  endtask

  task automatic clock_once(input logic user_reset);
    @(negedge clk);
    io_top_in[0][0] = user_reset;
    @(posedge clk);
    exp_cnt = user_reset ? 4'h0 : exp_cnt + 4'h1;
    if (!user_reset && exp_cnt == 4'h0) n_wraps++;
    if (user_reset) n_user_resets++; else n_counts++;
    #1;
  endtask

  logic [15:0] rd;
  initial begin
    build();
    #20 cfg_rst_n = 1;
    // the registered-mode word goes first: a LUT with its own output as an
    // input would otherwise ring while its BLE is still combinational
    for (int t = 0; t < 4; t++) cfg_write_word(t, 8, img[t][8]);
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < 25; a++) if (a != 8) cfg_write_word(t, a, img[t][a]);
    // readback
    for (int t = 0; t < 4; t++)
      for (int a = 0; a < 25; a++) begin
        cfg_read_word(t, a, rd);
        checks++;
        if (rd !== img[t][a]) begin
          failures++;
          $display("readback tile %0d word %0d: %h expected %h", t, a, rd, img[t][a]);
        end else n_readbacks++;
      end
    // start counting
    @(negedge clk); rst_n = 1;
    exp_cnt = 0;
    #1 check_cycle("after async reset");
    clock_once(1'b1); check_cycle("user reset");
    for (int i = 0; i < 37; i++) begin clock_once(1'b0); check_cycle("count"); end
    clock_once(1'b1); check_cycle("user reset mid-count");
    for (int i = 0; i < 9; i++) begin clock_once(1'b0); check_cycle("count"); end
    // asynchronous fabric reset between edges
    @(posedge clk); #2 rst_n = 0; #1;
    exp_cnt = 0; n_async_resets++;
    check_cycle("async reset");
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) begin clock_once(1'b0); check_cycle("count"); end

    // every mechanism must have happened
    checks++;
    if (n_writes != 100 || n_readbacks != 100 || n_wraps < 2 || n_user_resets < 2 ||
        n_async_resets < 1 || n_carry < 1 || n_sb_path < 1 || n_cb_path < 1 || n_counts < 1) begin
      failures++;
      $display("mechanism missing");
    end
    $display("mechanisms: writes=%0d readbacks=%0d counts=%0d wraps=%0d user_resets=%0d async_resets=%0d",
             n_writes, n_readbacks, n_counts, n_wraps, n_user_resets, n_async_resets);
    $display("            cb_path_high=%0d sb_path_high=%0d carry_high=%0d", n_cb_path, n_sb_path, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
