// tb_routing_switch: loads random configurations through the chain into two
// routing switches and compares every track output with a reference model
// written here: switch point k on crossing (k,k); groups of SHD switch points
// share configuration and alternate between straight-only (2 bits) and
// straight-plus-turns (6 bits); tracks whose segment skips this switch pass
// straight through.
//   dut_a: the 32 x 32 switch with one SRAM block per switch point.
//   dut_b: 8 x 6 tracks, SHD = 2, at position (1,2) with segmented tracks.
module tb_routing_switch;
  int checks = 0, failures = 0;
  logic clk = 0, cfg_en = 0, cfg_in = 0, cfg_mid, cfg_out, hold = 0;

  localparam int AH = 32, AV = 32;
  localparam int BH = 8,  BV = 6;
  localparam int unsigned SEGB_H [BH] = '{1, 2, 1, 3, 1, 1, 2, 1};
  localparam int unsigned SEGB_V [BV] = '{1, 1, 2, 3, 1, 2};

  logic [AV-1:0] an_in, an_out, as_in, as_out;
  logic [AH-1:0] ae_in, ae_out, aw_in, aw_out;
  logic [BV-1:0] bn_in, bn_out, bs_in, bs_out;
  logic [BH-1:0] be_in, be_out, bw_in, bw_out;

  routing_switch dut_a (.clk, .cfg_en, .cfg_in, .cfg_out(cfg_mid), .hold,
    .n_in(an_in), .n_out(an_out), .s_in(as_in), .s_out(as_out),
    .e_in(ae_in), .e_out(ae_out), .w_in(aw_in), .w_out(aw_out));

  routing_switch #(.TRK_H(BH), .TRK_V(BV), .SHD(2), .POS_X(1), .POS_Y(2),
                   .SEG_H(SEGB_H), .SEG_V(SEGB_V)) dut_b (
    .clk, .cfg_en, .cfg_in(cfg_mid), .cfg_out, .hold,
    .n_in(bn_in), .n_out(bn_out), .s_in(bs_in), .s_out(bs_out),
    .e_in(be_in), .e_out(be_out), .w_in(bw_in), .w_out(bw_out));

  // Configuration widths worked out by hand: A: 16 x 2 + 16 x 6 = 128.
  // B: 6 switch points in 3 groups: 2 + 6 + 2 = 10.
  localparam int AW = 128, BW = 10;
  logic [AW+BW-1:0] bits;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Six connection enables (ns, ew, ne, es, sw, wn) of switch point k.
  function automatic logic [5:0] sp_en(logic [AW+BW-1:0] b, int base, int k, int shd);
    int off = 0;
    int g = k / shd;
    for (int i = 0; i < g; i++) off += (i % 2 == 0) ? 2 : 6;
    if (g % 2 == 0) return {4'b0, b[base+off+1], b[base+off]};
    return 6'(b[base+off +: 6]);
  endfunction

  task automatic check_out(string n, int k, logic got, logic e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s[%0d]=%b expected %b", n, k, got, e);
    end
  endtask

  initial begin
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < AW + BW; i++) bits[i] = ($urandom % 3 == 0);
      @(negedge clk);
      cfg_en = 1;
      // The block nearest cfg_in (dut_a) holds the low bits of the chain.
      for (int i = AW + BW - 1; i >= 0; i--) begin
        cfg_in = bits[i];
        @(negedge clk);
      end
      cfg_en = 0;
      for (int v = 0; v < 20; v++) begin
        an_in = $urandom; as_in = $urandom; ae_in = $urandom; aw_in = $urandom;
        {bn_in, bs_in} = 12'($urandom);
        {be_in, bw_in} = 16'($urandom);
        #1;
        for (int k = 0; k < 32; k++) begin
          logic [5:0] m;
          m = sp_en(bits, 0, k, 1);
          check_out("a.n_out", k, an_out[k], (m[0] & as_in[k]) | (m[2] & ae_in[k]) | (m[5] & aw_in[k]));
          check_out("a.s_out", k, as_out[k], (m[0] & an_in[k]) | (m[3] & ae_in[k]) | (m[4] & aw_in[k]));
          check_out("a.e_out", k, ae_out[k], (m[1] & aw_in[k]) | (m[2] & an_in[k]) | (m[3] & as_in[k]));
          check_out("a.w_out", k, aw_out[k], (m[1] & ae_in[k]) | (m[5] & an_in[k]) | (m[4] & as_in[k]));
        end
        for (int k = 0; k < BH; k++) begin
          logic [5:0] m;
          logic hon, von, n, s, e, w;
          hon = (1 % SEGB_H[k]) == 0;
          if (k < BV) begin
            von = (2 % SEGB_V[k]) == 0;
            m = sp_en(bits, AW, k, 2);
            n = von ? bn_in[k] : 1'b0;
            s = von ? bs_in[k] : 1'b0;
          end else begin
            von = 0; m = '0; n = 0; s = 0;
          end
          e = hon ? be_in[k] : 1'b0;
          w = hon ? bw_in[k] : 1'b0;
          if (k < BV) begin
            check_out("b.n_out", k, bn_out[k], von ? ((m[0] & s) | (m[2] & e) | (m[5] & w)) : bs_in[k]);
            check_out("b.s_out", k, bs_out[k], von ? ((m[0] & n) | (m[3] & e) | (m[4] & w)) : bn_in[k]);
          end
          check_out("b.e_out", k, be_out[k], (hon && k < BV) ? ((m[1] & w) | (m[2] & n) | (m[3] & s)) : bw_in[k]);
          check_out("b.w_out", k, bw_out[k], (hon && k < BV) ? ((m[1] & e) | (m[5] & n) | (m[4] & s)) : be_in[k]);
        end
      end
    end
    // hold forces every output to 0
    hold = 1;
    for (int v = 0; v < 10; v++) begin
      an_in = $urandom; as_in = $urandom; ae_in = $urandom; aw_in = $urandom;
      {bn_in, bs_in} = 12'($urandom);
      {be_in, bw_in} = 16'($urandom);
      #1;
      checks++;
      if ({an_out, as_out, ae_out, aw_out, bn_out, bs_out, be_out, bw_out} != '0) begin
        failures++;
        $display("FAIL hold: outputs not zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
