// sram_manager: configuration memory of one tile.
//
// The original SRAM manager has a word-line decoder, write drivers,
// bitline pull-ups and sense amplifiers around the tile's SRAM cells, and
// programs 16-bit words (one 4-LUT truth table). This is its digital
// equivalent: NWORDS words of 16 storage bits, an address decoder, a write
// port and a read port. The analog read sequence (precharge the bitlines,
// then enable the sense amplifiers) is collapsed into one clocked read; the
// cells are flip-flops, as in the original standard-cell version, where
// latches take the place of the SRAM cells.
//
// Timing: with 'sel' (the tile's global word line from the outer decoder)
// high, 'we' writes 'wdata' to word 'addr' at the rising edge of cfg_clk;
// 're' loads word 'addr' into 'rdata' at the same edge (one cycle read
// latency). Addresses at or above NWORDS are ignored on write and read as
// zero. Every stored bit drives the fabric continuously through 'cfg'.
// 'cfg_rst_n' (asynchronous, active low) clears the memory, and while it is
// low 'cfg' is forced to zero, so the fabric has every switch open and
// every LUT at 0 from power-up until configuration starts, whatever the
// cells hold (an unprogrammed array could otherwise close ring oscillators
// through its routing loops). This reset is this design's choice; the
// original design does not discuss power-up.
module sram_manager
  import fpga_pkg::*;
#(
  parameter int unsigned NWORDS = N_WORDS,
  parameter int unsigned AW     = WADDR_W
) (
  input  logic                     cfg_clk,
  input  logic                     cfg_rst_n,
  input  logic                     sel,
  input  logic                     we,
  input  logic                     re,
  input  logic [AW-1:0]            addr,
  input  logic [WORD_W-1:0]        wdata,
  output logic [WORD_W-1:0]        rdata,
  output logic [NWORDS*WORD_W-1:0] cfg
);
  logic [NWORDS-1:0][WORD_W-1:0] mem;
  logic [NWORDS-1:0]             word_line;   // one-hot decoder output

  always_comb
    for (int a = 0; a < NWORDS; a++)
      word_line[a] = sel && (int'(addr) == a);

  always_ff @(posedge cfg_clk or negedge cfg_rst_n)
    if (!cfg_rst_n) begin
      mem   <= '0;
      rdata <= '0;
    end else begin
      for (int a = 0; a < NWORDS; a++)
        if (word_line[a] && we) mem[a] <= wdata;
      if (sel && re) rdata <= (int'(addr) < NWORDS) ? mem[addr] : '0;
    end

  assign cfg = cfg_rst_n ? mem : '0;

  // a word is never written and read in the same access
  a_no_rw: assert property (@(posedge cfg_clk) disable iff (!cfg_rst_n) !(sel && we && re));
endmodule
