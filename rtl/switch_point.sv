// switch_point: configurable connections at one crossing of a horizontal and
// a vertical routing track.
//
// A switch point can connect its four sides pairwise: 'n-s' and 'e-w'
// (straight through) and the turns 'n-e', 'e-s', 's-w', 'w-n'. CONN lists the
// connections that exist (built) in this switch point; en, from configuration
// memory, closes them. Each track is modelled as a pair of directed wires,
// one per direction, so a closed connection is a bidirectional switch made of
// two directed paths. A side's output is the OR of the enabled paths into it,
// which equals the wire's value whenever at most one source drives a net, as a
// valid configuration guarantees. Combinational.
module switch_point
  import efpga_pkg::*;
#(
  parameter sp_conn_t CONN = SP_TYPE2
) (
  input  sp_conn_t en,
  input  logic in_n, in_e, in_s, in_w,
  output logic out_n, out_e, out_s, out_w
);

  sp_conn_t c;
  assign c = en & CONN;

  assign out_n = (c[SP_NS] & in_s) | (c[SP_NE] & in_e) | (c[SP_WN] & in_w);
  assign out_s = (c[SP_NS] & in_n) | (c[SP_ES] & in_e) | (c[SP_SW] & in_w);
  assign out_e = (c[SP_EW] & in_w) | (c[SP_NE] & in_n) | (c[SP_ES] & in_s);
  assign out_w = (c[SP_EW] & in_e) | (c[SP_WN] & in_n) | (c[SP_SW] & in_s);

endmodule
