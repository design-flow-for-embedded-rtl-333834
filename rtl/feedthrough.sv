// feedthrough: feedthrough stage between adjacent clusters.
//
// For each of the N broadcast lines entering a cluster, one configuration bit
// chooses between the line delivered by the cluster's own connection box
// (0) and the same line of the neighbouring cluster (1). Chaining this
// selection over several clusters lets them share operands as if they were
// one larger cluster. The configuration lives in its own cfg_sram on the
// chain. Combinational from inputs to output.
module feedthrough #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  input  logic [N-1:0] cb_line,  // from this cluster's connection box
  input  logic [N-1:0] nb_line,  // the neighbouring cluster's lines
  output logic [N-1:0] line
);

  logic [N-1:0] sel;

  cfg_sram #(.W(N)) u_cfg (
    .clk, .cfg_en, .cfg_in, .cfg_out, .q(sel)
  );

  assign line = (sel & nb_line) | (~sel & cb_line);

endmodule
