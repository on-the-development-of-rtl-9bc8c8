// fpga_tile: one tile of the island-style array.
//
// A tile holds a CLB, the connection block on the vertical channel to its
// right, the connection block on the horizontal channel below it, the
// switch block at its bottom-right corner, and the SRAM manager holding the
// configuration of all four. Repeating the tile builds the array.
//
// CLB pins are spread over its four sides (input In_i sits on side i mod 4;
// outputs: Out_0 top, Out_1 left, Out_2 bottom, Out_3 right). Right and
// bottom pins meet this tile's connection blocks. Top and left pins meet the
// connection blocks of the tiles above and to the left, so they leave the
// tile as ports (top_*, left_*), and this tile's connection blocks serve the
// neighbours' pins through the far_* ports.
//
// Channel tracks are wired-OR buses (see conn_block): the tile outputs its
// drive on each of the four segments around its switch block (*_drv) and
// reads back the resolved segments (*_seg) from the array.
//   h_*  : horizontal segment below the CLB (switch block left side)
//   v_*  : vertical segment right of the CLB (switch block top side)
//   sbr_*: segment right of the switch block (next tile's h segment)
//   sbb_*: segment below the switch block (lower tile's v segment)
// Configuration word map: see fpga_pkg (25 words of 16 bits).
//
// The assertion a_bus_rule checks, at every fabric clock edge outside
// configuration reset, the tri-state bus rule on the tile's configuration:
// no wire or track of the tile's four segments is driven by two switches of
// this tile, no switch-block switch is enabled in both directions, and no
// input pin has two taps. (Contention between two tiles on a shared
// segment is outside its view.) The tile inherits structural
// combinational loops from its CLB feedback and routing (see clb,
// switch_block); a valid configuration never closes them.
module fpga_tile
  import fpga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // configuration port (tile's global word line and shared bus)
  input  logic               cfg_clk,
  input  logic               cfg_rst_n,
  input  logic               cfg_sel,
  input  logic               cfg_we,
  input  logic               cfg_re,
  input  logic [WADDR_W-1:0] cfg_addr,
  input  logic [WORD_W-1:0]  cfg_wdata,
  output logic [WORD_W-1:0]  cfg_rdata,
  // CLB pins served from outside the tile
  input  logic [2:0]         top_in,     // In_0, In_4, In_8
  output logic               top_out,    // Out_0
  input  logic [1:0]         left_in,    // In_3, In_7
  output logic               left_out,   // Out_1
  // neighbours' pins served by this tile's connection blocks
  output logic [2:0]         far_h_in,   // lower tile In_0, In_4, In_8
  input  logic               far_h_out,  // lower tile Out_0
  output logic [1:0]         far_v_in,   // right tile In_3, In_7
  input  logic               far_v_out,  // right tile Out_1
  // routing segments
  input  logic [W-1:0]       h_seg,
  output logic [W-1:0]       h_drv,
  input  logic [W-1:0]       v_seg,
  output logic [W-1:0]       v_drv,
  input  logic [W-1:0]       sbr_seg,
  output logic [W-1:0]       sbr_drv,
  input  logic [W-1:0]       sbb_seg,
  output logic [W-1:0]       sbb_drv
);
  logic [N_WORDS*WORD_W-1:0] cfg;
  logic [I-1:0]              clb_in;
  logic [N-1:0]              clb_out;
  logic [2:0]                r_in;        // In_1, In_5, In_9
  logic [1:0]                b_in;        // In_2, In_6
  logic [W-1:0]              cbh_drv, cbv_drv;
  logic [3:0][W-1:0]         sb_seg, sb_drv;

  sram_manager u_sram (
    .cfg_clk(cfg_clk), .cfg_rst_n(cfg_rst_n), .sel(cfg_sel), .we(cfg_we), .re(cfg_re),
    .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata), .cfg(cfg)
  );

  // configuration fields
  logic [N-1:0][WORD_W-1:0]       cfg_tt;
  logic [N-1:0][K-1:0][SEL_W-1:0] cfg_sel_m;
  logic [N-1:0]                   cfg_reg;
  always_comb begin
    for (int b = 0; b < N; b++) begin
      cfg_tt[b]    = cfg[(A_LUT+b)*WORD_W +: WORD_W];
      cfg_sel_m[b] = cfg[(A_IMUX+b)*WORD_W +: WORD_W];
    end
    cfg_reg = cfg[A_REG*WORD_W +: N];
  end

  // CLB pins by side
  assign clb_in   = {r_in[2], top_in[2], left_in[1], b_in[1], r_in[1],
                     top_in[1], left_in[0], b_in[0], r_in[0], top_in[0]};
  assign top_out  = clb_out[0];
  assign left_out = clb_out[1];

  clb u_clb (
    .clk(clk), .rst_n(rst_n), .cfg_tt(cfg_tt), .cfg_sel(cfg_sel_m), .cfg_reg(cfg_reg),
    .in(clb_in), .out(clb_out)
  );

  // vertical channel: near = right side (In_1, In_5, In_9, Out_3), far = right tile's left side
  conn_block #(.NNI(3), .NFI(2)) u_cbv (
    .cfg(cfg[A_CBV*WORD_W +: CB_BITS]), .trk(v_seg), .drv(cbv_drv),
    .near_in(r_in), .near_out(clb_out[3]), .far_in(far_v_in), .far_out(far_v_out)
  );

  // horizontal channel: near = bottom side (In_2, In_6, Out_2), far = lower tile's top side
  conn_block #(.NNI(2), .NFI(3)) u_cbh (
    .cfg(cfg[A_CBH*WORD_W +: CB_BITS]), .trk(h_seg), .drv(cbh_drv),
    .near_in(b_in), .near_out(clb_out[2]), .far_in(far_h_in), .far_out(far_h_out)
  );

  assign sb_seg[SIDE_L] = h_seg;
  assign sb_seg[SIDE_T] = v_seg;
  assign sb_seg[SIDE_R] = sbr_seg;
  assign sb_seg[SIDE_B] = sbb_seg;

  switch_block u_sb (.cfg(cfg[A_SB*WORD_W +: SB_BITS]), .seg(sb_seg), .drv(sb_drv));

  // ---------------- bus-rule check (simulation) ----------------
  function automatic bit at_most_one(input logic [FC-1:0] v);
    return (v & (v - 1'b1)) == '0;
  endfunction

  function automatic bit cb_ok(input logic [CB_BITS-1:0] c, input int nni, input int nfi,
                               output logic [W-1:0] out_en);
    logic [W-1:0] far_en;
    bit ok = 1;
    out_en = '0; far_en = '0;
    for (int p = 0; p < nni; p++) if (!at_most_one(c[p*FC +: FC])) ok = 0;
    for (int p = 0; p < nfi; p++) if (!at_most_one(c[WORD_W + p*FC +: FC])) ok = 0;
    for (int k = 0; k < FC; k++) begin
      out_en[cb_track(1'b0, nni, k)] |= c[nni*FC + k];
      far_en[cb_track(1'b1, nfi, k)] |= c[WORD_W + nfi*FC + k];
    end
    if ((out_en & far_en) != '0) ok = 0;
    out_en |= far_en;
    return ok;
  endfunction

  function automatic bit sb_ok(input logic [SB_BITS-1:0] c, output logic [3:0][W-1:0] en);
    bit ok = 1;
    en = '0;
    for (int q = 0; q < 6; q++)
      for (int i = 0; i < W; i++) begin
        logic ea, eb;
        ea = c[2*(q*W+i)];
        eb = c[2*(q*W+i)+1];
        if (ea && eb) ok = 0;
        if (ea && en[pair_a(q)][i]) ok = 0;
        if (eb && en[pair_b(q)][wilton_map(q, i)]) ok = 0;
        en[pair_a(q)][i] |= ea;
        en[pair_b(q)][wilton_map(q, i)] |= eb;
      end
    return ok;
  endfunction

  logic bus_ok;
  always_comb begin
    logic [W-1:0]      v_en, h_en;
    logic [3:0][W-1:0] s_en;
    bus_ok = cb_ok(cfg[A_CBV*WORD_W +: CB_BITS], 3, 2, v_en);
    bus_ok &= cb_ok(cfg[A_CBH*WORD_W +: CB_BITS], 2, 3, h_en);
    bus_ok &= sb_ok(cfg[A_SB*WORD_W +: SB_BITS], s_en);
    if ((v_en & s_en[SIDE_T]) != '0 || (h_en & s_en[SIDE_L]) != '0) bus_ok = 1'b0;
  end

  a_bus_rule: assert property (@(posedge clk) disable iff (!cfg_rst_n) bus_ok)
    else $error("fpga_tile: configuration drives a track or pin from two switches");

  assign h_drv   = cbh_drv | sb_drv[SIDE_L];
  assign v_drv   = cbv_drv | sb_drv[SIDE_T];
  assign sbr_drv = sb_drv[SIDE_R];
  assign sbb_drv = sb_drv[SIDE_B];
endmodule
