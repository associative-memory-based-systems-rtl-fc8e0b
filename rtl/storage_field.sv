// storage_field: the memory field with its row decoder and read/write
// periphery.
//
// R rows of W*K storage bits.  All cells are visible at once on the
// "cells" output, because every row's comparators work on their own stored
// word in parallel with the others; on chip these are six-transistor SRAM
// cells, here flip-flops.  A write stores a whole word in the row given by
// wr_addr at the clock edge; a read returns the row given by rd_addr one
// cycle later.  A read and a write of the same row in one cycle return the
// old word.  Reset clears all cells.
module storage_field #(
  parameter int unsigned R  = 64,
  parameter int unsigned W  = 16,
  parameter int unsigned K  = 5,
  localparam int unsigned WB = W * K,
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [WB-1:0]     wdata,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [WB-1:0]     rdata,
  output logic [R*WB-1:0]   cells     // row i at bits [i*WB +: WB]
);

  logic [WB-1:0] mem [R];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (wr_en) mem[wr_addr] <= wdata;
      if (rd_en) rdata <= mem[rd_addr];
    end
  end

  always_comb
    for (int i = 0; i < R; i++) cells[i*WB +: WB] = mem[i];

endmodule
