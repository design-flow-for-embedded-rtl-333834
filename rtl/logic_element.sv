// logic_element: one logic element (LE) of a cluster.
//
// An LE is a dedicated routing block (four drb_mux instances choosing the
// operands a, b, carry in and gate) followed by the core logic (le_core).
// The candidate sources, numbered as in efpga_pkg, are: constant 0 and 1,
// the sum and carry of the LE above (0,-1), the sums of the LEs above-left
// (+1,-1) and above-right (-1,-1), the carry of the LE to the right (-1,0),
// then the BC_ROW broadcast lines of the LE's row and the BC_COL broadcast
// lines of its column. Offsets follow the architecture's (X,Y) convention:
// X grows towards the more significant bit slice, Y downwards through the
// function slices. Which offsets are wired is this design's choice; the
// architecture leaves the list to the template.
//
// Configuration word cfg (from a possibly shared cfg_sram), LSB first:
// sel_a, sel_b, sel_c, sel_g (SW bits each), then the 3-bit function.
// Combinational from sources to s/co.
module logic_element
  import efpga_pkg::*;
#(
  parameter int unsigned BC_ROW = 2,
  parameter int unsigned BC_COL = 2,
  parameter logic [7:0]  FUNCS  = 8'h7F,
  localparam int unsigned NSRC  = drb_nsrc(BC_ROW, BC_COL),
  localparam int unsigned SW    = drb_sel_w(BC_ROW, BC_COL),
  localparam int unsigned CFG_W = le_cfg_w(BC_ROW, BC_COL)
) (
  input  logic              s_up,
  input  logic              c_up,
  input  logic              s_upl,
  input  logic              s_upr,
  input  logic              c_r,
  input  logic [BC_ROW-1:0] bc_row,
  input  logic [BC_COL-1:0] bc_col,
  input  logic [CFG_W-1:0]  cfg,
  output logic              s,
  output logic              co
);

  logic [NSRC-1:0]     src;
  logic [DRB_NMUX-1:0] op;  // a, b, c, g

  assign src[SRC_ZERO]  = 1'b0;
  assign src[SRC_ONE]   = 1'b1;
  assign src[SRC_S_UP]  = s_up;
  assign src[SRC_C_UP]  = c_up;
  assign src[SRC_S_UPL] = s_upl;
  assign src[SRC_S_UPR] = s_upr;
  assign src[SRC_C_R]   = c_r;
  assign src[SRC_BC +: BC_ROW]          = bc_row;
  assign src[SRC_BC + BC_ROW +: BC_COL] = bc_col;

  for (genvar m = 0; m < DRB_NMUX; m++) begin : g_drb
    drb_mux #(.NSRC(NSRC), .SW(SW)) u_mux (
      .src (src),
      .sel (cfg[m*SW +: SW]),
      .y   (op[m])
    );
  end

  le_core #(.FUNCS(FUNCS)) u_core (
    .func (le_func_e'(cfg[DRB_NMUX*SW +: LE_FUNC_W])),
    .a    (op[0]),
    .b    (op[1]),
    .c    (op[2]),
    .g    (op[3]),
    .s    (s),
    .co   (co)
  );

endmodule
