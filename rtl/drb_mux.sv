// drb_mux: one multiplexer of a dedicated routing block (DRB).
//
// A logic element's DRB is a set of these multiplexers; each picks one of the
// element's candidate sources (constants, local outputs of neighbouring
// elements at fixed offsets, broadcast lines) as an operand of the core logic.
// The select comes from configuration memory; a select past the last source
// gives 0. Combinational.
module drb_mux #(
  parameter int unsigned NSRC = 11,
  parameter int unsigned SW   = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic [NSRC-1:0] src,
  input  logic [SW-1:0]   sel,
  output logic            y
);

  always_comb begin
    y = 1'b0;
    for (int unsigned i = 0; i < NSRC; i++)
      if (sel == SW'(i)) y = src[i];
  end

endmodule
