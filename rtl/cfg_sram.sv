// cfg_sram: one block of configuration memory.
//
// Every configurable element of the fabric (a group of logic elements, a
// group of switch points, the selects of a connection box) reads its setting
// from one of these blocks; when several adjacent elements share a block they
// are configured identically. The architecture stores the bits in SRAM cells;
// how the cells are written is not specified, so this design loads them as a
// shift register: all blocks are chained and the bitstream is the
// concatenation of the blocks' contents in chain order.
//
// Interface: while cfg_en is high, each rising clk edge shifts cfg_in into
// q[0] and every bit one place up; cfg_out is q[W-1], which feeds the next
// block in the chain. With cfg_en low the contents hold and q drives the
// fabric. The bits are not reset, like SRAM cells: a design must be loaded
// before use. Loading a chain of total length N takes N cycles, and the bit
// shifted in first ends in the highest position of the last block.
module cfg_sram #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (cfg_en) begin
      q <= W'({q, cfg_in});
    end
  end

  assign cfg_out = q[W-1];

endmodule
