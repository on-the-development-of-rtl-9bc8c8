// fpga_bits_pkg: builds configuration images for the testbenches.
//
// A tile image is the 25 words of one SRAM manager. The helpers set the
// fields by meaning (truth table, input-mux select, registered bit,
// connection-block tap, switch-block buffer) following the word map
// documented in fpga_pkg and the modules, written out here independently.
package fpga_bits_pkg;
  typedef logic [24:0][15:0] tile_img_t;

  // truth table of BLE b
  function automatic void set_lut(ref tile_img_t img, input int b, input logic [15:0] tt);
    img[0 + b] = tt;
  endfunction

  // LUT input k of BLE b takes source s (0..9 CLB input, 10..13 BLE output)
  function automatic void set_sel(ref tile_img_t img, input int b, input int k, input int s);
    img[4 + b][4*k +: 4] = 4'(s);
  endfunction

  function automatic void set_reg(ref tile_img_t img, input int b);
    img[8][b] = 1'b1;
  endfunction

  // connection block tap: vert=1 for the vertical (right) channel block,
  // far=1 for the neighbour's pins, pin position p, track t. Returns 0 if
  // the pin cannot reach that track.
  function automatic bit set_cb(ref tile_img_t img, input bit vert, input bit far,
                                input int p, input int t);
    int cls = far ? (p + 2) % 4 : p;
    int word = (vert ? 9 : 11) + (far ? 1 : 0);
    if (t % 4 != cls) return 0;
    img[word][p*4 + t/4] = 1'b1;
    return 1;
  endfunction

  // switch-block buffer: pair q, wire i on the pair's first side, dir 0
  // drives the first side from the second, dir 1 the second from the first
  function automatic void set_sb(ref tile_img_t img, input int q, input int i, input int dir);
    int bitn = 2 * (q * 16 + i) + dir;
    img[13 + bitn / 16][bitn % 16] = 1'b1;
  endfunction
endpackage
