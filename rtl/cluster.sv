// cluster: two-dimensional cluster of logic elements.
//
// Arithmetic datapaths are organised in function slices (one elementary
// n-bit operation each, a row here) and bit slices (all elements of one bit
// weight, a column). The cluster mirrors this: LE_Y rows by LE_X columns of
// logic_element. Column x is bit slice x (x = 0 least significant, drawn at
// the east edge), row y is function slice y (y = 0 at the north edge).
//
// Inputs reach the LEs over broadcast lines instead of a per-LE connection
// box: every LE of row y sees the BC_ROW row lines of that row, every LE of
// column x the BC_COL column lines of that column. Line numbering groups bus
// bits: row line k of row y is bc_row[k*LE_Y + y], column line k of column x
// is bc_col[k*LE_X + x].
// Local connections: each LE can take the sum and carry of the LE above, the
// sums of the LEs above-left and above-right, and the carry of the LE to its
// right (carry chain towards the more significant slice). At the cluster
// border these come from the neighbouring clusters (north_s/north_c,
// east_c); the diagonal ones beyond the border read 0.
//
// Register stages: after every REG_EVERY-th row a register_stage can register
// the row's sums (REG_OUTS = 1) or sums and carries (REG_OUTS = 2) on their
// way down; each bit has its own bypass bit (flip-flops, or latches when
// REG_LATCH = 1). The carry passed sideways and
// out of the west edge is never registered.
//
// Shared SRAMs: SHD_LE adjacent LEs of a row share one configuration word,
// so an n-bit function slice can be configured with one word.
// Quiet while not running: while cfg_en is high or en is low, every LE output
// is forced to 0. Unloaded or half-shifted configuration memory can describe
// combinational loops through the routing fabric, and holding the LEs quiet
// keeps such loops from oscillating until a complete bitstream is in place
// and en (run) is raised. This gating is this design's choice.
// Configuration, LSB first: LE words row by row (group 0 = columns
// 0..SHD_LE-1), then the register stage bits, stage by stage.
// Outputs: south_s/south_c the last row (after its register stage, if any),
// west_s/west_c the westmost column of each row.
module cluster
  import efpga_pkg::*;
#(
  parameter int unsigned LE_X      = 4,
  parameter int unsigned LE_Y      = 4,
  parameter int unsigned BC_ROW    = 2,
  parameter int unsigned BC_COL    = 2,
  parameter int unsigned SHD_LE    = 1,
  parameter int unsigned REG_EVERY = 2,
  parameter int unsigned REG_OUTS  = 1,
  parameter bit          REG_LATCH = 1'b0,   // register stages built as latches
  parameter logic [7:0]  FUNCS     = 8'h7F,
  localparam int unsigned LCW      = le_cfg_w(BC_ROW, BC_COL),
  localparam int unsigned NGX      = LE_X / SHD_LE,
  localparam int unsigned LE_BITS  = LE_Y * NGX * LCW,
  localparam int unsigned CFG_W    = cluster_cfg_w(LE_X, LE_Y, BC_ROW, BC_COL, SHD_LE,
                                                   REG_EVERY, REG_OUTS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     cfg_en,
  input  logic                     cfg_in,
  output logic                     cfg_out,
  input  logic [BC_ROW*LE_Y-1:0]   bc_row,
  input  logic [BC_COL*LE_X-1:0]   bc_col,
  input  logic [LE_X-1:0]          north_s,
  input  logic [LE_X-1:0]          north_c,
  input  logic [LE_Y-1:0]          east_c,
  output logic [LE_X-1:0]          south_s,
  output logic [LE_X-1:0]          south_c,
  output logic [LE_Y-1:0]          west_s,
  output logic [LE_Y-1:0]          west_c
);

  logic [CFG_W-1:0] cfg;

  cfg_sram #(.W(CFG_W)) u_cfg (
    .clk, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  logic quiet;
  assign quiet = cfg_en | ~en;

  // Raw LE outputs and the values passed down (after a register stage).
  logic [LE_X-1:0] s_raw [LE_Y];
  logic [LE_X-1:0] c_raw [LE_Y];
  logic [LE_X-1:0] s_dn  [LE_Y];
  logic [LE_X-1:0] c_dn  [LE_Y];

  for (genvar y = 0; y < LE_Y; y++) begin : g_row
    logic [LE_X-1:0]   up_s, up_c;
    logic [BC_ROW-1:0] rl;

    if (y == 0) begin : g_top
      assign up_s = north_s;
      assign up_c = north_c;
    end else begin : g_inner
      assign up_s = s_dn[y-1];
      assign up_c = c_dn[y-1];
    end

    for (genvar k = 0; k < BC_ROW; k++) begin : g_rl
      assign rl[k] = bc_row[k*LE_Y + y];
    end

    for (genvar x = 0; x < LE_X; x++) begin : g_col
      logic [BC_COL-1:0] cl;
      logic              upl, upr, cr;
      logic              s_le, c_le;

      for (genvar k = 0; k < BC_COL; k++) begin : g_cl
        assign cl[k] = bc_col[k*LE_X + x];
      end

      if (x + 1 < LE_X) begin : g_upl
        assign upl = up_s[x+1];
      end else begin : g_upl0
        assign upl = 1'b0;
      end
      if (x > 0) begin : g_upr
        assign upr = up_s[x-1];
        assign cr  = c_raw[y][x-1];
      end else begin : g_upr0
        assign upr = 1'b0;
        assign cr  = east_c[y];
      end

      logic_element #(.BC_ROW(BC_ROW), .BC_COL(BC_COL), .FUNCS(FUNCS)) u_le (
        .s_up   (up_s[x]),
        .c_up   (up_c[x]),
        .s_upl  (upl),
        .s_upr  (upr),
        .c_r    (cr),
        .bc_row (rl),
        .bc_col (cl),
        .cfg    (cfg[(y*NGX + x/SHD_LE)*LCW +: LCW]),
        .s      (s_le),
        .co     (c_le)
      );

      assign s_raw[y][x] = s_le & ~quiet;
      assign c_raw[y][x] = c_le & ~quiet;
    end

    if ((y + 1) % REG_EVERY == 0) begin : g_reg
      localparam int unsigned ST  = (y + 1) / REG_EVERY - 1;
      localparam int unsigned RW  = LE_X * REG_OUTS;
      logic [RW-1:0] d, q;
      if (REG_OUTS == 2) begin : g_sc
        assign d = {c_raw[y], s_raw[y]};
        assign s_dn[y] = q[LE_X-1:0];
        assign c_dn[y] = q[RW-1:LE_X];
      end else begin : g_s
        assign d = s_raw[y];
        assign s_dn[y] = q;
        assign c_dn[y] = c_raw[y];
      end
      register_stage #(.N(RW), .LATCH(REG_LATCH)) u_reg (
        .clk, .rst_n, .en,
        .cfg (cfg[LE_BITS + ST*RW +: RW]),
        .d   (d),
        .q   (q)
      );
    end else begin : g_noreg
      assign s_dn[y] = s_raw[y];
      assign c_dn[y] = c_raw[y];
    end

    assign west_s[y] = s_dn[y][LE_X-1];
    assign west_c[y] = c_raw[y][LE_X-1];
  end

  assign south_s = s_dn[LE_Y-1];
  assign south_c = c_dn[LE_Y-1];

endmodule
