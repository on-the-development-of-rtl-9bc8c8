// cfg_serial: serial configuration port.
//
// Serial-to-parallel: while 'shift' is high, one bit of 'sin' enters a
// FRAME_W-bit shift register per rising edge of cfg_clk, most significant
// bit first. A frame is {tile address, word address, data word}. A one-cycle
// 'write' pulse presents the frame to the SRAM managers as a write ('we'
// for that cycle); a one-cycle 'read' pulse presents the tile and word
// address as a read ('re').
//
// Parallel-to-serial: one cycle after the read access (the SRAM manager's
// read latency) the returned word is loaded into a 16-bit output register
// whose most significant bit is on 'sout'; each further 'shift' cycle moves
// the next bit onto 'sout'. So the read word is available on 'sout' from
// the second edge after 'read', MSB first, and shifting a new frame in
// reads the previous word out at the same time.
//
// The original design only states that a serial-to-parallel and a
// parallel-to-serial interface were built; the frame format and the
// strobes are this design's choices. 'write' and 'read' are not to be
// raised together, nor while 'shift' is high (asserted). 'we' and 're'
// are the strobes themselves: the access happens on the edge that ends the
// strobe cycle, with the address and data held in the shift register.
module cfg_serial
  import fpga_pkg::*;
#(
  parameter int unsigned TAW     = 2,
  parameter int unsigned AW      = WADDR_W,
  parameter int unsigned FRAME_W = TAW + AW + WORD_W
) (
  input  logic              cfg_clk,
  input  logic              cfg_rst_n,
  input  logic              sin,
  input  logic              shift,
  input  logic              write,
  input  logic              read,
  output logic              sout,
  // parallel side, towards the decoders and SRAM managers
  output logic [TAW-1:0]    tile_addr,
  output logic [AW-1:0]     word_addr,
  output logic [WORD_W-1:0] wdata,
  output logic              we,
  output logic              re,
  input  logic [WORD_W-1:0] rdata
);
  logic [FRAME_W-1:0] frame;
  logic [WORD_W-1:0]  obuf;
  logic               rd_pend;

  always_ff @(posedge cfg_clk or negedge cfg_rst_n)
    if (!cfg_rst_n) begin
      frame   <= '0;
      obuf    <= '0;
      rd_pend <= 1'b0;
    end else begin
      if (shift) frame <= {frame[FRAME_W-2:0], sin};
      rd_pend <= read;
      if (rd_pend)    obuf <= rdata;
      else if (shift) obuf <= {obuf[WORD_W-2:0], 1'b0};
    end

  assign {tile_addr, word_addr, wdata} = frame;
  assign we   = write;
  assign re   = read;
  assign sout = obuf[WORD_W-1];

  a_strobes: assert property (@(posedge cfg_clk) disable iff (!cfg_rst_n)
                              !(write && read) && !((write || read) && shift));
endmodule
