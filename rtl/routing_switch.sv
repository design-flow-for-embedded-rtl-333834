// routing_switch: one routing switch (RS) of the fabric.
//
// TRK_H horizontal and TRK_V vertical tracks cross inside the switch. Switch
// points sit on the diagonal: switch point k joins horizontal track k and
// vertical track k at crossing (k,k); the other crossings have none. Groups
// of SHD adjacent switch points share one configuration SRAM block, and the
// groups alternate between type 1 (straight 'n-s' and 'e-w' only) and type 2
// (straight plus the four turns), see efpga_pkg::rs_sp_type.
//
// Segmentation: each track has a segment length (SEG_H, SEG_V, counted in
// routing switches). A horizontal track of length L enters the switch points
// of the routing switches whose column POS_X is a multiple of L and passes
// straight through all others; vertical tracks likewise with POS_Y. A
// track passing through presents 0 to the switch point and ignores its
// output.
//
// Every track is a pair of directed wires. Side naming: x_in is what arrives
// at side x from outside, x_out what leaves through side x.
//
// Hold: while hold is high every track output is 0. The fabric raises it
// while it is being configured or not running; every closed track loop runs
// through a routing switch, so this keeps unloaded or half-loaded
// configurations from trapping or circulating values (this design's choice).
//
// Configuration: one cfg_sram on the chain, groups in order of k, each group
// packed as the compact list of its type's connections (ascending index).
// Combinational between the track ports.
module routing_switch
  import efpga_pkg::*;
#(
  parameter int unsigned TRK_H = 32,
  parameter int unsigned TRK_V = 32,
  parameter int unsigned SHD   = 1,
  parameter int unsigned POS_X = 0,
  parameter int unsigned POS_Y = 0,
  parameter int unsigned SEG_H [TRK_H] = '{default: 1},
  parameter int unsigned SEG_V [TRK_V] = '{default: 1},
  localparam int unsigned NSP   = rs_nsp(TRK_H, TRK_V),
  localparam int unsigned CFG_W = rs_cfg_w(TRK_H, TRK_V, SHD)
) (
  input  logic             clk,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic             hold,
  input  logic [TRK_V-1:0] n_in,
  output logic [TRK_V-1:0] n_out,
  input  logic [TRK_V-1:0] s_in,
  output logic [TRK_V-1:0] s_out,
  input  logic [TRK_H-1:0] e_in,
  output logic [TRK_H-1:0] e_out,
  input  logic [TRK_H-1:0] w_in,
  output logic [TRK_H-1:0] w_out
);

  logic [CFG_W-1:0] cfg;
  logic [TRK_V-1:0] n_o, s_o;
  logic [TRK_H-1:0] e_o, w_o;

  assign n_out = hold ? '0 : n_o;
  assign s_out = hold ? '0 : s_o;
  assign e_out = hold ? '0 : e_o;
  assign w_out = hold ? '0 : w_o;

  cfg_sram #(.W(CFG_W)) u_cfg (
    .clk, .cfg_en, .cfg_in, .cfg_out, .q(cfg)
  );

  for (genvar k = 0; k < NSP; k++) begin : g_sp
    localparam sp_conn_t    CONN  = rs_sp_type(k, SHD);
    localparam int unsigned OFF   = rs_cfg_off(k / SHD, SHD);
    localparam bit          H_ON  = (POS_X % SEG_H[k]) == 0;
    localparam bit          V_ON  = (POS_Y % SEG_V[k]) == 0;

    sp_conn_t en;
    logic     sn, se, ss, sw;

    // Expand the compact group configuration to the six connection bits.
    for (genvar i = 0; i < SP_NCONN; i++) begin : g_conn
      localparam int unsigned J = popcount6(CONN & sp_conn_t'((1 << i) - 1));
      if (CONN[i]) begin : g_on
        assign en[i] = cfg[OFF + J];
      end else begin : g_off
        assign en[i] = 1'b0;
      end
    end

    switch_point #(.CONN(CONN)) u_sp (
      .en    (en),
      .in_n  (V_ON ? n_in[k] : 1'b0),
      .in_s  (V_ON ? s_in[k] : 1'b0),
      .in_e  (H_ON ? e_in[k] : 1'b0),
      .in_w  (H_ON ? w_in[k] : 1'b0),
      .out_n (sn),
      .out_s (ss),
      .out_e (se),
      .out_w (sw)
    );

    assign n_o[k] = V_ON ? sn : s_in[k];
    assign s_o[k] = V_ON ? ss : n_in[k];
    assign e_o[k] = H_ON ? se : w_in[k];
    assign w_o[k] = H_ON ? sw : e_in[k];
  end

  // Tracks beyond the diagonal (when TRK_H != TRK_V) pass straight through.
  for (genvar t = NSP; t < TRK_V; t++) begin : g_v_thru
    assign n_o[t] = s_in[t];
    assign s_o[t] = n_in[t];
  end
  for (genvar t = NSP; t < TRK_H; t++) begin : g_h_thru
    assign e_o[t] = w_in[t];
    assign w_o[t] = e_in[t];
  end

endmodule
