// register_stage: optional registers on the outputs of one row of LEs.
//
// Registers need not follow every logic element: a stage can be placed after
// every REG_EVERY-th row of a cluster. Each of the N bits passing through has
// one configuration bit: 1 sends the bit through a flip-flop, 0 bypasses it.
// The storage type is a parameter: LATCH = 0 builds flip-flops that load on
// every rising clk edge while en is high; LATCH = 1 builds level-sensitive
// latches that are transparent while clk and en are high and hold while clk
// is low (a cheaper stage for two-phase timing). Both clear on the active-low
// reset. Output = registered or bypassed input.
module register_stage #(
  parameter int unsigned N     = 4,
  parameter bit          LATCH = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] cfg,   // 1 = registered
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  logic [N-1:0] r;

  if (LATCH) begin : g_latch
    always_latch begin
      if (!rst_n)          r = '0;
      else if (clk && en)  r = d;
    end
  end else begin : g_ff
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  r <= '0;
      else if (en) r <= d;
    end
  end

  assign q = (cfg & r) | (~cfg & d);

endmodule
