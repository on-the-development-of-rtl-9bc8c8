// fpga_top: island-style FPGA, an NX x NY array of identical tiles (2 x 2 by
// default) with its configuration path.
//
// Tile (x, y) sits in column x (left to right) and row y (top to bottom).
// Each tile owns the horizontal channel segment below its CLB, the vertical
// segment to its right, and the switch block where they meet (fpga_tile).
// Segments are 16-track wired-OR buses; this module resolves each of them
// as the OR of every drive made onto it.
//
// Perimeter. The original design draws I/O blocks around the array but does not
// describe them; here the perimeter is brought out as plain ports instead:
//  * CLB pins that face the perimeter (top pins of row 0, left pins of
//    column 0) connect straight to io_top_* / io_left_* ports;
//  * the open ends of the channel segments (left end of row-y horizontal
//    segment of column 0, top end of column-x vertical segment of row 0)
//    and the outer sides of the last switch blocks (right side of column
//    NX-1, bottom side of row NY-1) are edge_*_out ports carrying the
//    resolved tracks; edge_*_in ports are ORed onto the same tracks (hold
//    them at 0 where nothing outside drives).
//
// Configuration: cfg_serial shifts frames {tile, word, data} in on cfg_sin;
// cfg_decoder raises the word line of tile y*NX+x; that tile's SRAM manager
// writes or reads the word. Read data comes back on cfg_sout (see
// cfg_serial for the timing). The fabric clock 'clk' and asynchronous reset
// 'rst_n' reach every BLE flip-flop; the configuration side has its own
// clock and reset.
//
// Routing and local-feedback paths are structural combinational loops; they
// close only under invalid configurations.
module fpga_top
  import fpga_pkg::*;
#(
  parameter int unsigned NX = 2,
  parameter int unsigned NY = 2,
  parameter int unsigned TAW = (NX * NY > 1) ? $clog2(NX * NY) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  logic                   cfg_clk,
  input  logic                   cfg_rst_n,
  input  logic                   cfg_sin,
  input  logic                   cfg_shift,
  input  logic                   cfg_write,
  input  logic                   cfg_read,
  output logic                   cfg_sout,
  // perimeter CLB pins
  input  logic [NX-1:0][2:0]     io_top_in,    // row 0: In_0, In_4, In_8
  output logic [NX-1:0]          io_top_out,   // row 0: Out_0
  input  logic [NY-1:0][1:0]     io_left_in,   // column 0: In_3, In_7
  output logic [NY-1:0]          io_left_out,  // column 0: Out_1
  // perimeter track ends
  input  logic [NY-1:0][W-1:0]   edge_l_in,
  output logic [NY-1:0][W-1:0]   edge_l_out,
  input  logic [NX-1:0][W-1:0]   edge_t_in,
  output logic [NX-1:0][W-1:0]   edge_t_out,
  input  logic [NY-1:0][W-1:0]   edge_r_in,
  output logic [NY-1:0][W-1:0]   edge_r_out,
  input  logic [NX-1:0][W-1:0]   edge_b_in,
  output logic [NX-1:0][W-1:0]   edge_b_out
);
  localparam int unsigned NT = NX * NY;

  // ---------------- configuration path ----------------
  logic [TAW-1:0]              c_tile;
  logic [WADDR_W-1:0]          c_word;
  logic [WORD_W-1:0]           c_wdata, c_rdata;
  logic                        c_we, c_re;
  logic [NT-1:0]               c_sel;
  logic [NT-1:0][WORD_W-1:0]   t_rdata;

  cfg_serial #(.TAW(TAW)) u_cfg_serial (
    .cfg_clk(cfg_clk), .cfg_rst_n(cfg_rst_n), .sin(cfg_sin), .shift(cfg_shift),
    .write(cfg_write), .read(cfg_read), .sout(cfg_sout),
    .tile_addr(c_tile), .word_addr(c_word), .wdata(c_wdata), .we(c_we), .re(c_re),
    .rdata(c_rdata)
  );

  cfg_decoder #(.NTILES(NT), .TAW(TAW)) u_cfg_dec (
    .en(c_we | c_re), .tile_addr(c_tile), .tile_sel(c_sel)
  );

  // read data of the tile that was last read (its rdata register holds it)
  logic [TAW-1:0] rd_tile;
  always_ff @(posedge cfg_clk or negedge cfg_rst_n)
    if (!cfg_rst_n)  rd_tile <= '0;
    else if (c_re)   rd_tile <= c_tile;
  assign c_rdata = (int'(rd_tile) < NT) ? t_rdata[rd_tile] : '0;

  // ---------------- tile array ----------------
  logic [NX-1:0][NY-1:0][W-1:0] h_seg, h_drv, v_seg, v_drv;
  logic [NX-1:0][NY-1:0][W-1:0] sbr_seg, sbr_drv, sbb_seg, sbb_drv;
  logic [NX-1:0][NY-1:0][2:0]   top_in, far_h_in;
  logic [NX-1:0][NY-1:0][1:0]   left_in, far_v_in;
  logic [NX-1:0][NY-1:0]        top_out, left_out, far_h_out, far_v_out;

  for (genvar x = 0; x < NX; x++) begin : g_x
    for (genvar y = 0; y < NY; y++) begin : g_y
      fpga_tile u_tile (
        .clk(clk), .rst_n(rst_n),
        .cfg_clk(cfg_clk), .cfg_rst_n(cfg_rst_n), .cfg_sel(c_sel[y*NX+x]),
        .cfg_we(c_we), .cfg_re(c_re), .cfg_addr(c_word), .cfg_wdata(c_wdata),
        .cfg_rdata(t_rdata[y*NX+x]),
        .top_in(top_in[x][y]), .top_out(top_out[x][y]),
        .left_in(left_in[x][y]), .left_out(left_out[x][y]),
        .far_h_in(far_h_in[x][y]), .far_h_out(far_h_out[x][y]),
        .far_v_in(far_v_in[x][y]), .far_v_out(far_v_out[x][y]),
        .h_seg(h_seg[x][y]), .h_drv(h_drv[x][y]),
        .v_seg(v_seg[x][y]), .v_drv(v_drv[x][y]),
        .sbr_seg(sbr_seg[x][y]), .sbr_drv(sbr_drv[x][y]),
        .sbb_seg(sbb_seg[x][y]), .sbb_drv(sbb_drv[x][y])
      );

      // horizontal segment below CLB (x,y): driven by this tile and by the
      // switch block on its left end (tile x-1), or by the perimeter
      if (x == 0) begin : g_hl
        assign h_seg[x][y]   = h_drv[x][y] | edge_l_in[y];
        assign edge_l_out[y] = h_seg[x][y];
        assign left_in[x][y] = io_left_in[y];
        assign io_left_out[y] = left_out[x][y];
      end else begin : g_hn
        assign h_seg[x][y]     = h_drv[x][y] | sbr_drv[x-1][y];
        assign left_in[x][y]   = far_v_in[x-1][y];
      end
      // vertical segment right of CLB (x,y)
      if (y == 0) begin : g_vt
        assign v_seg[x][y]   = v_drv[x][y] | edge_t_in[x];
        assign edge_t_out[x] = v_seg[x][y];
        assign top_in[x][y]  = io_top_in[x];
        assign io_top_out[x] = top_out[x][y];
      end else begin : g_vn
        assign v_seg[x][y]  = v_drv[x][y] | sbb_drv[x][y-1];
        assign top_in[x][y] = far_h_in[x][y-1];
      end
      // switch block right side and far pins of the vertical connection block
      if (x == NX - 1) begin : g_re
        assign sbr_seg[x][y]   = sbr_drv[x][y] | edge_r_in[y];
        assign edge_r_out[y]   = sbr_seg[x][y];
        assign far_v_out[x][y] = 1'b0;        // no CLB beyond the right edge
      end else begin : g_rn
        assign sbr_seg[x][y]   = h_seg[x+1][y];
        assign far_v_out[x][y] = left_out[x+1][y];
      end
      // switch block bottom side and far pins of the horizontal connection block
      if (y == NY - 1) begin : g_be
        assign sbb_seg[x][y]   = sbb_drv[x][y] | edge_b_in[x];
        assign edge_b_out[x]   = sbb_seg[x][y];
        assign far_h_out[x][y] = 1'b0;        // no CLB below the bottom edge
      end else begin : g_bn
        assign sbb_seg[x][y]   = v_seg[x][y+1];
        assign far_h_out[x][y] = top_out[x][y+1];
      end
    end
  end
endmodule
