// weight_ram - CMAC weight vector memory.
//
// A single-port synchronous RAM of 2^ADDR_W words of WORD_W bits. With the
// defaults (2^18 words of four 8-bit weights) it holds one million weights,
// the 1 Mbyte of static RAM on the card. One access per cycle: with en high,
// we high writes wdata at addr; with we low the word at addr appears on rdata
// on the next cycle. Contents are not reset; the sequencer's clear operation
// zeroes them.
//
// The capacity and weight width follow the card; the word width, the
// single-cycle synchronous access and the lack of byte enables are this
// design's.
module weight_ram #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we)
        mem[addr] <= wdata;
      else
        rdata <= mem[addr];
    end
  end

endmodule
