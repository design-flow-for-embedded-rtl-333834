// tb_connection_box: random configurations loaded through the chain into two
// connection boxes; broadcast lines and track outputs are compared with a
// reference model written here.
//   dut_a: the default 32-track channel (8 unconnected, 8 fully connected,
//          16 periodic with a 2-track window moving 1 track per line), 8
//          lines, 8 LE outputs, no sharing.
//   dut_b: 12 tracks (4 fully connected, 8 periodic with a 3-track window
//          starting at track 1 and moving 2 tracks every 2 lines), 6 lines,
//          4 outputs, selects shared by pairs.
// A further directed part checks the bus use of a periodic group: with
// shared selects, one select puts consecutive tracks on consecutive lines.
module tb_connection_box;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, cfg_en = 0, cfg_in = 0, cfg_mid, cfg_out;

  localparam cb_grps_t GB = '{
    '{kind: CB_FULL,     width: 8'd4, win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1},
    '{kind: CB_PERIODIC, width: 8'd8, win_w: 8'd3, win_v: 8'd2, win_p: 8'd1, win_per: 8'd2},
    '{kind: CB_UNCONN,   width: 8'd0, win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1},
    '{kind: CB_UNCONN,   width: 8'd0, win_w: 8'd0, win_v: 8'd0, win_p: 8'd0, win_per: 8'd1}
  };

  logic [31:0] aa_in, aa_out, ab_in, ab_out;
  logic [7:0]  a_line, a_le;
  logic [11:0] ba_in, ba_out, bb_in, bb_out;
  logic [5:0]  b_line;
  logic [3:0]  b_le;

  connection_box dut_a (.clk, .cfg_en, .cfg_in, .cfg_out(cfg_mid),
    .a_in(aa_in), .a_out(aa_out), .b_in(ab_in), .b_out(ab_out), .line(a_line), .le_out(a_le));
  connection_box #(.NT(12), .NL(6), .NO(4), .SHD(2), .NGRP(2), .GRPS(GB)) dut_b (
    .clk, .cfg_en, .cfg_in(cfg_mid), .cfg_out,
    .a_in(ba_in), .a_out(ba_out), .b_in(bb_in), .b_out(bb_out), .line(b_line), .le_out(b_le));

  // Configuration layouts worked out by hand.
  // A: line candidates = 8 full + 2 periodic = 10 -> 4-bit selects; 8 lines
  //    = 32 bits, then 32 tracks x 4-bit output selects = 128; total 160.
  // B: line candidates = 4 + 3 = 7 -> 3 bits; 3 shared line selects = 9,
  //    then 6 shared track selects x 3 bits = 18; total 27.
  localparam int AW = 160, BW = 27;
  logic [AW+BW-1:0] bits;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Connection point of track t and line (or output) l.
  function automatic bit cp_a(int t, int l);
    if (t < 8) return 0;
    if (t < 16) return 1;
    return (((t - 16) - l + 16) % 16) < 2;
  endfunction
  function automatic bit cp_b(int t, int l);
    int st;
    if (t < 4) return 1;
    st = (1 + 2 * (l / 2)) % 8;
    return (((t - 4) - st + 8) % 8) < 3;
  endfunction

  task automatic load();
    @(negedge clk);
    cfg_en = 1;
    for (int i = AW + BW - 1; i >= 0; i--) begin
      cfg_in = bits[i];
      @(negedge clk);
    end
    cfg_en = 0;
  endtask

  task automatic chk(string n, int k, logic got, logic e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s[%0d]=%b expected %b", n, k, got, e);
    end
  endtask

  initial begin
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < AW + BW; i++) bits[i] = 1'($urandom);
      load();
      for (int v = 0; v < 10; v++) begin
        aa_in = $urandom; ab_in = $urandom & $urandom; a_le = 8'($urandom);
        ba_in = 12'($urandom); bb_in = 12'($urandom); b_le = 4'($urandom);
        #1;
        // dut_a lines
        for (int l = 0; l < 8; l++) begin
          int sel, rank; logic e;
          sel = int'(bits[l*4 +: 4]); rank = 0; e = 0;
          for (int t = 0; t < 32; t++) if (cp_a(t, l)) begin
            rank++;
            if (rank == sel) e = aa_in[t] | ab_in[t];
          end
          chk("a.line", l, a_line[l], e);
        end
        for (int t = 0; t < 32; t++) begin
          int sel, rank; logic drv, e;
          sel = int'(bits[32 + t*4 +: 4]); rank = 0; drv = 0; e = 0;
          for (int o = 0; o < 8; o++) if (cp_a(t, o)) begin
            rank++;
            if (rank == sel) begin drv = 1; e = a_le[o]; end
          end
          chk("a.a_out", t, aa_out[t], drv ? e : aa_in[t]);
          chk("a.b_out", t, ab_out[t], drv ? e : ab_in[t]);
        end
        // dut_b lines
        for (int l = 0; l < 6; l++) begin
          int sel, rank; logic e;
          sel = int'(bits[AW + (l/2)*3 +: 3]); rank = 0; e = 0;
          for (int t = 0; t < 12; t++) if (cp_b(t, l)) begin
            rank++;
            if (rank == sel) e = ba_in[t] | bb_in[t];
          end
          chk("b.line", l, b_line[l], e);
        end
        for (int t = 0; t < 12; t++) begin
          int sel, rank; logic drv, e;
          sel = int'(bits[AW + 9 + (t/2)*3 +: 3]); rank = 0; drv = 0; e = 0;
          for (int o = 0; o < 4; o++) if (cp_b(t, o)) begin
            rank++;
            if (rank == sel) begin drv = 1; e = b_le[o]; end
          end
          chk("b.a_out", t, ba_out[t], drv ? e : ba_in[t]);
          chk("b.b_out", t, bb_out[t], drv ? e : bb_in[t]);
        end
      end
    end
    // Bus use of the periodic group of dut_a: every line selects rank 9,
    // the first periodic track of its window, i.e. track 16 + l.
    bits = '0;
    for (int l = 0; l < 8; l++) bits[l*4 +: 4] = 4'd9;
    load();
    for (int v = 0; v < 20; v++) begin
      aa_in = $urandom; ab_in = '0;
      #1;
      checks++;
      if (a_line !== aa_in[23:16]) begin
        failures++;
        $display("FAIL periodic bus: line=%b tracks=%b", a_line, aa_in[23:16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
