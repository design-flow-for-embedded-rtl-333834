// efpga_pkg: types, constants and elaboration-time helper functions shared by
// the blocks of the arithmetic-oriented embedded FPGA fabric.
//
// Contents:
//  * le_func_e        - the elementary functions a logic element's core logic
//                       can be configured to (full addition and gated full
//                       addition are the two the architecture names; the
//                       plain logic functions are this design's additions).
//  * switch point connection indices and the two switch point types used by
//                       the routing switch (type 1: straight through only,
//                       type 2: straight through plus all four turns).
//  * connection box track group types (unconnected, fully connected,
//                       periodic) and the connection-point rule of the
//                       sliding window.
//  * DRB source numbering of a logic element.
//  * configuration width functions, so that a testbench or a bitstream
//                       builder can place every block's bits in the chain.
// Nothing here is synthesised on its own.
package efpga_pkg;

  // ---------------------------------------------------------------- LE core
  typedef enum logic [2:0] {
    LE_FA   = 3'd0,  // s = a^b^c,       co = maj(a,b,c)
    LE_GFA  = 3'd1,  // s = (a&g)^b^c,   co = maj(a&g,b,c)
    LE_AND  = 3'd2,  // s = a&b
    LE_OR   = 3'd3,  // s = a|b
    LE_XOR  = 3'd4,  // s = a^b
    LE_MUX  = 3'd5,  // s = g ? b : a
    LE_PASS = 3'd6,  // s = a
    LE_OFF  = 3'd7   // s = 0
  } le_func_e;

  localparam int unsigned LE_FUNC_W = 3;
  // Operand multiplexers of the DRB: a, b, carry in, gate.
  localparam int unsigned DRB_NMUX  = 4;

  // DRB source numbering (offsets are (X,Y) with X growing towards the more
  // significant bit slice and Y growing downwards, one function slice per row).
  localparam int unsigned SRC_ZERO   = 0;  // constant 0
  localparam int unsigned SRC_ONE    = 1;  // constant 1
  localparam int unsigned SRC_S_UP   = 2;  // sum   of LE ( 0,-1)
  localparam int unsigned SRC_C_UP   = 3;  // carry of LE ( 0,-1)
  localparam int unsigned SRC_S_UPL  = 4;  // sum   of LE (+1,-1)
  localparam int unsigned SRC_S_UPR  = 5;  // sum   of LE (-1,-1)
  localparam int unsigned SRC_C_R    = 6;  // carry of LE (-1, 0)
  localparam int unsigned SRC_BC     = 7;  // first broadcast line (row lines, then column lines)

  function automatic int unsigned drb_nsrc(int unsigned bc_row, int unsigned bc_col);
    return SRC_BC + bc_row + bc_col;
  endfunction

  function automatic int unsigned drb_sel_w(int unsigned bc_row, int unsigned bc_col);
    return $clog2(drb_nsrc(bc_row, bc_col));
  endfunction

  function automatic int unsigned le_cfg_w(int unsigned bc_row, int unsigned bc_col);
    return DRB_NMUX * drb_sel_w(bc_row, bc_col) + LE_FUNC_W;
  endfunction

  // Number of register stages in a cluster of le_y rows with one stage after
  // every reg_every rows.
  function automatic int unsigned n_reg_stages(int unsigned le_y, int unsigned reg_every);
    return le_y / reg_every;
  endfunction

  function automatic int unsigned cluster_cfg_w(int unsigned le_x, int unsigned le_y,
                                                int unsigned bc_row, int unsigned bc_col,
                                                int unsigned shd_le, int unsigned reg_every,
                                                int unsigned reg_outs);
    return le_y * (le_x / shd_le) * le_cfg_w(bc_row, bc_col)
         + n_reg_stages(le_y, reg_every) * le_x * reg_outs;
  endfunction

  // ---------------------------------------------------------- switch point
  // Connection index inside a switch point (one configuration bit each).
  localparam int unsigned SP_NS = 0;
  localparam int unsigned SP_EW = 1;
  localparam int unsigned SP_NE = 2;
  localparam int unsigned SP_ES = 3;
  localparam int unsigned SP_SW = 4;
  localparam int unsigned SP_WN = 5;
  localparam int unsigned SP_NCONN = 6;

  typedef logic [SP_NCONN-1:0] sp_conn_t;

  localparam sp_conn_t SP_TYPE1 = 6'b000011;  // 'n-s', 'e-w'
  localparam sp_conn_t SP_TYPE2 = 6'b111111;  // 'n-s', 'e-w' and the four turns

  // Switch point k of a routing switch lies at crossing (k,k). Switch points
  // are configured in groups of shd adjacent ones sharing one SRAM block, and
  // the groups alternate between type 1 and type 2.
  function automatic sp_conn_t rs_sp_type(int unsigned k, int unsigned shd);
    return ((k / shd) % 2 == 0) ? SP_TYPE1 : SP_TYPE2;
  endfunction

  function automatic int unsigned popcount6(sp_conn_t m);
    int unsigned n = 0;
    for (int i = 0; i < SP_NCONN; i++) n += m[i];
    return n;
  endfunction

  // First configuration bit of SRAM group g.
  function automatic int unsigned rs_cfg_off(int unsigned g, int unsigned shd);
    int unsigned o = 0;
    for (int unsigned i = 0; i < g; i++) o += popcount6(rs_sp_type(i * shd, shd));
    return o;
  endfunction

  function automatic int unsigned rs_nsp(int unsigned trk_h, int unsigned trk_v);
    return (trk_h < trk_v) ? trk_h : trk_v;
  endfunction

  function automatic int unsigned rs_cfg_w(int unsigned trk_h, int unsigned trk_v, int unsigned shd);
    return rs_cfg_off((rs_nsp(trk_h, trk_v) + shd - 1) / shd, shd);
  endfunction

  // --------------------------------------------------------- connection box
  typedef enum logic [1:0] {
    CB_UNCONN   = 2'd0,
    CB_FULL     = 2'd1,
    CB_PERIODIC = 2'd2
  } cb_grp_e;

  localparam int unsigned CB_MAX_GRP = 4;

  typedef struct packed {
    cb_grp_e         kind;
    logic [7:0]      width;   // tracks in the group
    logic [7:0]      win_w;   // periodic: window width in tracks
    logic [7:0]      win_v;   // periodic: window velocity, tracks per step
    logic [7:0]      win_p;   // periodic: window phase, start track of step 0
    logic [7:0]      win_per; // periodic: lines per window step (periodicity)
  } cb_grp_t;

  typedef cb_grp_t cb_grps_t [CB_MAX_GRP];

  // Whether track t of the channel has a connection point to line b.
  function automatic bit cb_cp(cb_grps_t g, int unsigned ngrp, int unsigned t, int unsigned b);
    int unsigned base = 0;
    for (int unsigned i = 0; i < ngrp; i++) begin
      int unsigned w = int'(g[i].width);
      if (t >= base && t < base + w) begin
        int unsigned j = t - base;
        case (g[i].kind)
          CB_FULL:     return 1'b1;
          CB_PERIODIC: begin
            int unsigned start = (int'(g[i].win_p) + int'(g[i].win_v) * (b / int'(g[i].win_per))) % w;
            return ((j + w - start) % w) < int'(g[i].win_w);
          end
          default:     return 1'b0;
        endcase
      end
      base += w;
    end
    return 1'b0;
  endfunction

  // Position (1-based) of track t among the tracks connected to line b;
  // 0 when there is no connection point.
  function automatic int unsigned cb_rank_t(cb_grps_t g, int unsigned ngrp, int unsigned t, int unsigned b);
    int unsigned r = 0;
    if (!cb_cp(g, ngrp, t, b)) return 0;
    for (int unsigned u = 0; u <= t; u++) r += cb_cp(g, ngrp, u, b);
    return r;
  endfunction

  // Position (1-based) of output o among the outputs connected to track t.
  function automatic int unsigned cb_rank_o(cb_grps_t g, int unsigned ngrp, int unsigned t, int unsigned o);
    int unsigned r = 0;
    if (!cb_cp(g, ngrp, t, o)) return 0;
    for (int unsigned u = 0; u <= o; u++) r += cb_cp(g, ngrp, t, u);
    return r;
  endfunction

  // Largest number of tracks any line connects to.
  function automatic int unsigned cb_max_cand(cb_grps_t g, int unsigned ngrp, int unsigned nt, int unsigned nl);
    int unsigned m = 0;
    for (int unsigned b = 0; b < nl; b++) begin
      int unsigned c = 0;
      for (int unsigned t = 0; t < nt; t++) c += cb_cp(g, ngrp, t, b);
      if (c > m) m = c;
    end
    return m;
  endfunction

  function automatic int unsigned cb_lsel_w(cb_grps_t g, int unsigned ngrp, int unsigned nt, int unsigned nl);
    return $clog2(cb_max_cand(g, ngrp, nt, nl) + 1);
  endfunction

  function automatic int unsigned cb_osel_w(int unsigned no);
    return $clog2(no + 1);
  endfunction

  function automatic int unsigned cb_cfg_w(cb_grps_t g, int unsigned ngrp, int unsigned nt,
                                           int unsigned nl, int unsigned no, int unsigned shd);
    return ((nl + shd - 1) / shd) * cb_lsel_w(g, ngrp, nt, nl)
         + ((nt + shd - 1) / shd) * cb_osel_w(no);
  endfunction

  // Default channel: 8 unconnected tracks, 8 fully connected tracks and
  // 16 periodic tracks with a two-track window moving one track per line.
  localparam cb_grps_t CB_DEFAULT_GRPS = '{
    '{kind: CB_UNCONN,   width: 8'd8,  win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1},
    '{kind: CB_FULL,     width: 8'd8,  win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1},
    '{kind: CB_PERIODIC, width: 8'd16, win_w: 8'd2, win_v: 8'd1, win_p: 8'd0, win_per: 8'd1},
    '{kind: CB_UNCONN,   width: 8'd0,  win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1}
  };

endpackage
