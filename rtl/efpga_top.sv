// efpga_top: embedded FPGA fabric built from the architecture template.
//
// NX x NY tiles. Tile (i,j) (i = 0 at the west edge, j = 0 at the north edge)
// holds a cluster of logic elements, a horizontal connection box (H-CB) on
// the routing channel above the cluster feeding its column broadcast lines,
// a vertical connection box (V-CB) on the channel east of it feeding its row
// broadcast lines, a routing switch (RS) where the two channels cross at the
// tile's north-east corner, and two feedthrough stages that let the cluster
// reuse the column lines of the cluster above and the row lines of the
// cluster to the east (virtually larger clusters).
//
// Signal flow between tiles:
//  * tracks: each routing channel is TRK_H (horizontal) or TRK_V (vertical)
//    tracks, each a pair of directed wires. Channels at the fabric edge end
//    in the edge ports (edge_n_*, edge_s_*, edge_w_*, edge_e_*).
//  * LE outputs: the south border outputs of cluster (i,j) (sums and
//    carries) can be driven onto the H-CB of tile (i,j+1); the west border
//    outputs onto the V-CB of tile (i-1,j). The bottom row's south outputs
//    and the west column's west outputs are also brought out directly
//    (south_s/south_c, west_s/west_c).
//  * local connections: cluster (i,j) takes its north neighbour's south
//    outputs and its east neighbour's west carries, so carry chains and
//    function slices continue across cluster borders. Inputs beyond the
//    fabric edge read 0.
//
// Configuration: one chain from cfg_in to cfg_out. Tiles in order
// j*NX + i; inside a tile RS, H-CB, V-CB, column feedthrough, row
// feedthrough, cluster. TILE_CFG_W bits per tile, CFG_BITS in all; shifting
// takes one clk per bit with cfg_en high. run enables the register stages
// and releases the LE outputs and routing switch outputs, which are held at
// 0 while run is low or cfg_en is high, so an unloaded or partly loaded
// bitstream cannot make the fabric oscillate or trap values in track loops.
//
// The track network contains structural combinational loops through the
// switch points and connection boxes, as every FPGA routing fabric does; a
// valid configuration closes no loop, so they stand.
module efpga_top
  import efpga_pkg::*;
#(
  parameter int unsigned NX        = 2,
  parameter int unsigned NY        = 2,
  parameter int unsigned TRK_H     = 32,
  parameter int unsigned TRK_V     = 32,
  parameter int unsigned SHD_RS    = 1,
  parameter int unsigned SEG_H [TRK_H] = '{default: 1},
  parameter int unsigned SEG_V [TRK_V] = '{default: 1},
  parameter int unsigned SHD_CB    = 1,
  parameter int unsigned CB_NGRP   = 3,
  parameter cb_grps_t    CB_GRPS   = CB_DEFAULT_GRPS,
  parameter int unsigned LE_X      = 4,
  parameter int unsigned LE_Y      = 4,
  parameter int unsigned BC_ROW    = 2,
  parameter int unsigned BC_COL    = 2,
  parameter int unsigned SHD_LE    = 1,
  parameter int unsigned REG_EVERY = 2,
  parameter int unsigned REG_OUTS  = 1,
  parameter bit          REG_LATCH = 1'b0,
  parameter logic [7:0]  FUNCS     = 8'h7F,
  localparam int unsigned NCOL_L   = BC_COL * LE_X,
  localparam int unsigned NROW_L   = BC_ROW * LE_Y,
  localparam int unsigned RS_W     = rs_cfg_w(TRK_H, TRK_V, SHD_RS),
  localparam int unsigned HCB_W    = cb_cfg_w(CB_GRPS, CB_NGRP, TRK_H, NCOL_L, 2*LE_X, SHD_CB),
  localparam int unsigned VCB_W    = cb_cfg_w(CB_GRPS, CB_NGRP, TRK_V, NROW_L, 2*LE_Y, SHD_CB),
  localparam int unsigned CL_W     = cluster_cfg_w(LE_X, LE_Y, BC_ROW, BC_COL, SHD_LE,
                                                   REG_EVERY, REG_OUTS),
  localparam int unsigned TILE_CFG_W = RS_W + HCB_W + VCB_W + NCOL_L + NROW_L + CL_W,
  localparam int unsigned CFG_BITS = NX * NY * TILE_CFG_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  input  logic                         cfg_en,
  input  logic                         cfg_in,
  output logic                         cfg_out,
  input  logic [NX-1:0][TRK_V-1:0]     edge_n_in,
  output logic [NX-1:0][TRK_V-1:0]     edge_n_out,
  input  logic [NX-1:0][TRK_V-1:0]     edge_s_in,
  output logic [NX-1:0][TRK_V-1:0]     edge_s_out,
  input  logic [NY-1:0][TRK_H-1:0]     edge_w_in,
  output logic [NY-1:0][TRK_H-1:0]     edge_w_out,
  input  logic [NY-1:0][TRK_H-1:0]     edge_e_in,
  output logic [NY-1:0][TRK_H-1:0]     edge_e_out,
  output logic [NX-1:0][LE_X-1:0]      south_s,
  output logic [NX-1:0][LE_X-1:0]      south_c,
  output logic [NY-1:0][LE_Y-1:0]      west_s,
  output logic [NY-1:0][LE_Y-1:0]      west_c
);

  localparam int unsigned NT = NX * NY;

  // Per-tile nets, indexed [i][j].
  logic [TRK_V-1:0]  rs_n_in  [NX][NY], rs_n_out [NX][NY];
  logic [TRK_V-1:0]  rs_s_in  [NX][NY], rs_s_out [NX][NY];
  logic [TRK_H-1:0]  rs_e_in  [NX][NY], rs_e_out [NX][NY];
  logic [TRK_H-1:0]  rs_w_in  [NX][NY], rs_w_out [NX][NY];
  logic [TRK_H-1:0]  hcb_a_in [NX][NY], hcb_a_out[NX][NY];
  logic [TRK_H-1:0]  hcb_b_in [NX][NY], hcb_b_out[NX][NY];
  logic [TRK_V-1:0]  vcb_a_in [NX][NY], vcb_a_out[NX][NY];
  logic [TRK_V-1:0]  vcb_b_in [NX][NY], vcb_b_out[NX][NY];
  logic [NCOL_L-1:0] hcb_line [NX][NY], col_line [NX][NY], col_nb [NX][NY];
  logic [NROW_L-1:0] vcb_line [NX][NY], row_line [NX][NY], row_nb [NX][NY];
  logic [2*LE_X-1:0] hcb_le   [NX][NY];
  logic [2*LE_Y-1:0] vcb_le   [NX][NY];
  logic [LE_X-1:0]   cl_n_s   [NX][NY], cl_n_c [NX][NY];
  logic [LE_X-1:0]   cl_s_s   [NX][NY], cl_s_c [NX][NY];
  logic [LE_Y-1:0]   cl_e_c   [NX][NY];
  logic [LE_Y-1:0]   cl_w_s   [NX][NY], cl_w_c [NX][NY];
  logic              chain    [NT*6+1];

  // Routing switches and LEs stay quiet until a bitstream is loaded and run
  // is raised.
  logic hold;
  assign hold = cfg_en | ~run;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NT*6];

  for (genvar i = 0; i < NX; i++) begin : g_x
    for (genvar j = 0; j < NY; j++) begin : g_y
      localparam int unsigned T = (j * NX + i) * 6;

      // ---------------- routing switch at the north-east corner
      if (j == 0) begin : g_n_edge
        assign rs_n_in[i][j]  = edge_n_in[i];
        assign edge_n_out[i]  = rs_n_out[i][j];
      end else begin : g_n_in
        assign rs_n_in[i][j]     = vcb_a_out[i][j-1];
        assign vcb_b_in[i][j-1]  = rs_n_out[i][j];
      end
      if (i == NX - 1) begin : g_e_edge
        assign rs_e_in[i][j]  = edge_e_in[j];
        assign edge_e_out[j]  = rs_e_out[i][j];
      end else begin : g_e_in
        assign rs_e_in[i][j]     = hcb_b_out[i+1][j];
        assign hcb_a_in[i+1][j]  = rs_e_out[i][j];
      end
      assign rs_w_in[i][j]  = hcb_a_out[i][j];
      assign hcb_b_in[i][j] = rs_w_out[i][j];
      assign vcb_a_in[i][j] = rs_s_out[i][j];
      assign rs_s_in[i][j]  = vcb_b_out[i][j];

      routing_switch #(
        .TRK_H (TRK_H), .TRK_V (TRK_V), .SHD (SHD_RS),
        .POS_X (i), .POS_Y (j), .SEG_H (SEG_H), .SEG_V (SEG_V)
      ) u_rs (
        .clk, .cfg_en, .cfg_in (chain[T]), .cfg_out (chain[T+1]), .hold (hold),
        .n_in (rs_n_in[i][j]), .n_out (rs_n_out[i][j]),
        .s_in (rs_s_in[i][j]), .s_out (rs_s_out[i][j]),
        .e_in (rs_e_in[i][j]), .e_out (rs_e_out[i][j]),
        .w_in (rs_w_in[i][j]), .w_out (rs_w_out[i][j])
      );

      // ---------------- channel ends at the west and south fabric edges
      if (i == 0) begin : g_w_edge
        assign hcb_a_in[i][j] = edge_w_in[j];
        assign edge_w_out[j]  = hcb_b_out[i][j];
      end
      if (j == NY - 1) begin : g_s_edge
        assign vcb_b_in[i][j] = edge_s_in[i];
        assign edge_s_out[i]  = vcb_a_out[i][j];
      end

      // ---------------- LE outputs offered to the connection boxes
      if (j == 0) begin : g_hle0
        assign hcb_le[i][j] = '0;
      end else begin : g_hle
        assign hcb_le[i][j] = {cl_s_c[i][j-1], cl_s_s[i][j-1]};
      end
      if (i == NX - 1) begin : g_vle0
        assign vcb_le[i][j] = '0;
      end else begin : g_vle
        assign vcb_le[i][j] = {cl_w_c[i+1][j], cl_w_s[i+1][j]};
      end

      connection_box #(
        .NT (TRK_H), .NL (NCOL_L), .NO (2*LE_X), .SHD (SHD_CB),
        .NGRP (CB_NGRP), .GRPS (CB_GRPS)
      ) u_hcb (
        .clk, .cfg_en, .cfg_in (chain[T+1]), .cfg_out (chain[T+2]),
        .a_in (hcb_a_in[i][j]), .a_out (hcb_a_out[i][j]),
        .b_in (hcb_b_in[i][j]), .b_out (hcb_b_out[i][j]),
        .line (hcb_line[i][j]), .le_out (hcb_le[i][j])
      );

      connection_box #(
        .NT (TRK_V), .NL (NROW_L), .NO (2*LE_Y), .SHD (SHD_CB),
        .NGRP (CB_NGRP), .GRPS (CB_GRPS)
      ) u_vcb (
        .clk, .cfg_en, .cfg_in (chain[T+2]), .cfg_out (chain[T+3]),
        .a_in (vcb_a_in[i][j]), .a_out (vcb_a_out[i][j]),
        .b_in (vcb_b_in[i][j]), .b_out (vcb_b_out[i][j]),
        .line (vcb_line[i][j]), .le_out (vcb_le[i][j])
      );

      // ---------------- feedthrough stages
      if (j == 0) begin : g_cnb0
        assign col_nb[i][j] = '0;
      end else begin : g_cnb
        assign col_nb[i][j] = col_line[i][j-1];
      end
      if (i == NX - 1) begin : g_rnb0
        assign row_nb[i][j] = '0;
      end else begin : g_rnb
        assign row_nb[i][j] = row_line[i+1][j];
      end

      feedthrough #(.N(NCOL_L)) u_ftc (
        .clk, .cfg_en, .cfg_in (chain[T+3]), .cfg_out (chain[T+4]),
        .cb_line (hcb_line[i][j]), .nb_line (col_nb[i][j]), .line (col_line[i][j])
      );
      feedthrough #(.N(NROW_L)) u_ftr (
        .clk, .cfg_en, .cfg_in (chain[T+4]), .cfg_out (chain[T+5]),
        .cb_line (vcb_line[i][j]), .nb_line (row_nb[i][j]), .line (row_line[i][j])
      );

      // ---------------- cluster
      if (j == 0) begin : g_nn0
        assign cl_n_s[i][j] = '0;
        assign cl_n_c[i][j] = '0;
      end else begin : g_nn
        assign cl_n_s[i][j] = cl_s_s[i][j-1];
        assign cl_n_c[i][j] = cl_s_c[i][j-1];
      end
      if (i == NX - 1) begin : g_ec0
        assign cl_e_c[i][j] = '0;
      end else begin : g_ec
        assign cl_e_c[i][j] = cl_w_c[i+1][j];
      end

      cluster #(
        .LE_X (LE_X), .LE_Y (LE_Y), .BC_ROW (BC_ROW), .BC_COL (BC_COL),
        .SHD_LE (SHD_LE), .REG_EVERY (REG_EVERY), .REG_OUTS (REG_OUTS), .REG_LATCH (REG_LATCH), .FUNCS (FUNCS)
      ) u_cl (
        .clk, .rst_n, .en (run), .cfg_en, .cfg_in (chain[T+5]), .cfg_out (chain[T+6]),
        .bc_row  (row_line[i][j]),
        .bc_col  (col_line[i][j]),
        .north_s (cl_n_s[i][j]), .north_c (cl_n_c[i][j]),
        .east_c  (cl_e_c[i][j]),
        .south_s (cl_s_s[i][j]), .south_c (cl_s_c[i][j]),
        .west_s  (cl_w_s[i][j]), .west_c  (cl_w_c[i][j])
      );

      if (j == NY - 1) begin : g_sout
        assign south_s[i] = cl_s_s[i][j];
        assign south_c[i] = cl_s_c[i][j];
      end
      if (i == 0) begin : g_wout
        assign west_s[j] = cl_w_s[i][j];
        assign west_c[j] = cl_w_c[i][j];
      end
    end
  end

endmodule
