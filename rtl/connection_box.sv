// connection_box: connection box (CB) between a routing channel and a cluster.
//
// The channel holds NT tracks made of up to CB_MAX_GRP groups (NGRP used).
// Each group is unconnected (no connection points: fast, lightly loaded
// tracks), fully connected (every track reaches every line) or periodic: a
// window of win_w connection points slides across the group's tracks, moving
// win_v tracks for every win_per lines and starting at track win_p, so that
// the bits of a bus land on consecutive broadcast lines. efpga_pkg::cb_cp is
// the exact rule.
//
// Inputs to the cluster: each of the NL broadcast lines takes the track its
// configuration selects, by rank among the tracks with a connection point to
// that line (0 = none, line reads 0). A track's value is the OR of its two
// directed wires (the net carries at most one driver).
// Outputs of the cluster: each track can be driven by one of NO LE outputs,
// again chosen by rank among the outputs with a connection point to it; the
// driven value leaves the box in both directions. Undriven tracks pass
// straight through.
// Shared SRAMs: SHD adjacent lines (and SHD adjacent tracks) share one select;
// because the select is a rank, a periodic window then picks consecutive
// tracks for consecutive lines.
//
// Track direction naming: a_in/a_out travel from end A to end B, b_in/b_out
// the other way (A is west or north, as the fabric places the box).
// Configuration, LSB first: line selects (group 0 first), then track selects.
// Combinational apart from the configuration block.
module connection_box
  import efpga_pkg::*;
#(
  parameter int unsigned NT   = 32,
  parameter int unsigned NL   = 8,
  parameter int unsigned NO   = 8,
  parameter int unsigned SHD  = 1,
  parameter int unsigned NGRP = 3,
  parameter cb_grps_t    GRPS = CB_DEFAULT_GRPS,
  localparam int unsigned LSW   = cb_lsel_w(GRPS, NGRP, NT, NL),
  localparam int unsigned OSW   = cb_osel_w(NO),
  localparam int unsigned NLG   = (NL + SHD - 1) / SHD,
  localparam int unsigned NTG   = (NT + SHD - 1) / SHD,
  localparam int unsigned CFG_W = cb_cfg_w(GRPS, NGRP, NT, NL, NO, SHD)
) (
  input  logic          clk,
  input  logic          cfg_en,
  input  logic          cfg_in,
  output logic          cfg_out,
  input  logic [NT-1:0] a_in,
  output logic [NT-1:0] a_out,
  input  logic [NT-1:0] b_in,
  output logic [NT-1:0] b_out,
  output logic [NL-1:0] line,
  input  logic [NO-1:0] le_out
);

  logic [CFG_W-1:0] cfg;
  logic [NT-1:0]    trk;

  cfg_sram #(.W(CFG_W)) u_cfg (
    .clk, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  assign trk = a_in | b_in;

  // Connection points and their ranks are elaboration-time constants, so
  // only the existing connection points are built.
  for (genvar l = 0; l < NL; l++) begin : g_line
    logic [LSW-1:0] sel;
    logic [NT-1:0]  hit;
    assign sel = cfg[(l / SHD) * LSW +: LSW];
    for (genvar t = 0; t < NT; t++) begin : g_cp
      localparam bit          CP = cb_cp(GRPS, NGRP, t, l);
      localparam int unsigned RK = cb_rank_t(GRPS, NGRP, t, l);
      if (CP) begin : g_on
        assign hit[t] = (sel == LSW'(RK)) & trk[t];
      end else begin : g_off
        assign hit[t] = 1'b0;
      end
    end
    assign line[l] = |hit;
  end

  for (genvar t = 0; t < NT; t++) begin : g_trk
    logic [OSW-1:0] sel;
    logic [NO-1:0]  hit, val;
    logic           drv;
    assign sel = cfg[NLG * LSW + (t / SHD) * OSW +: OSW];
    for (genvar o = 0; o < NO; o++) begin : g_cp
      localparam bit          CP = cb_cp(GRPS, NGRP, t, o);
      localparam int unsigned RK = cb_rank_o(GRPS, NGRP, t, o);
      if (CP) begin : g_on
        assign hit[o] = (sel == OSW'(RK));
      end else begin : g_off
        assign hit[o] = 1'b0;
      end
    end
    assign val = hit & le_out;
    assign drv = |hit;
    assign a_out[t] = drv ? |val : a_in[t];
    assign b_out[t] = drv ? |val : b_in[t];
  end

  // NTG is part of the configuration layout; keep it visible to readers.
  if (CFG_W != NLG * LSW + NTG * OSW) begin : g_bad_cfg
    $error("connection_box: configuration width mismatch");
  end

endmodule
