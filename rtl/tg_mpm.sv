// Multiprocessor memory (MPM) of the HIB.
//
// The on-board memory that holds the shared pages that live at this node:
// 16 MByte organised as 4M words of 32 bits by default. One port, one
// access per cycle: with en and we high the word at addr is written; with
// en high and we low it is read and appears on rdata at the next clock
// edge. rdata holds its value while en is low.
//
// The 16 MByte size is the board's published figure (built there from
// DRAM); the single synchronous port is this design's own choice.
module tg_mpm
  import tg_pkg::*;
#(
  parameter int unsigned AW = WADDR_W   // 22: 4M words
) (
  input  logic   clk,
  input  logic   en,
  input  logic   we,
  input  waddr_t addr,
  input  word_t  wdata,
  output word_t  rdata
);
  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr[AW-1:0]] <= wdata;
      else    rdata <= mem[addr[AW-1:0]];
    end
  end
endmodule
