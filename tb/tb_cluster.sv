// tb_cluster: configures clusters through the chain with small datapaths and
// checks results and register-stage latency against arithmetic done here.
//   dut  : default 4 x 4 cluster, one SRAM word per LE, sums registered.
//   dut2 : same size, SRAM words shared by LE pairs, sums and carries
//          registered.
// Program P1 (both): row 0 adds the column-line operands A + B with a ripple
//   carry, row 1 XORs the sum with a row broadcast line, register stage 0
//   registers, row 2 passes, row 3 adds 1 (carry in from a constant in dut,
//   from the east border in dut2), register stage 1 bypassed:
//   south_s(t) = ((A+B) ^ {4{r}})(t-1) + 1, one cycle latency.
// Program P2 (dut): row 0 adds the north border sums, carries and the east
//   carry in; row 1 XORs the above-left and above-right sums; row 3 ANDs
//   with a row line; both stages registered: two cycles latency.
module tb_cluster;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1, cfg_en = 0, cfg_in = 0, cfg_mid, cfg_out;
  logic [7:0] bc_row, bc_col;
  logic [3:0] north_s, north_c, east_c, east_c2;
  logic [3:0] south_s, south_c, west_s, west_c;
  logic [3:0] south_s2, south_c2, west_s2, west_c2;

  cluster dut (.clk, .rst_n, .en, .cfg_en, .cfg_in, .cfg_out(cfg_mid),
    .bc_row, .bc_col, .north_s, .north_c, .east_c,
    .south_s, .south_c, .west_s, .west_c);
  cluster #(.SHD_LE(2), .REG_OUTS(2)) dut2 (.clk, .rst_n, .en, .cfg_en, .cfg_in(cfg_mid), .cfg_out,
    .bc_row, .bc_col, .north_s(4'b0), .north_c(4'b0), .east_c(east_c2),
    .south_s(south_s2), .south_c(south_c2), .west_s(west_s2), .west_c(west_c2));

  // Layouts: 11 sources -> 4-bit selects, 19-bit LE words.
  // dut : 16 words = 304 bits, then 2 stages x 4 bits = 312.
  // dut2: 8 words = 152 bits, then 2 stages x 8 bits = 168.
  localparam int W1 = 312, W2 = 168;
  logic [W1+W2-1:0] bits;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [18:0] word(int f, int sa, int sb, int sc, int sg);
    return {3'(f), 4'(sg), 4'(sc), 4'(sb), 4'(sa)};
  endfunction

  task automatic load();
    @(negedge clk);
    cfg_en = 1;
    for (int i = W1 + W2 - 1; i >= 0; i--) begin
      cfg_in = bits[i];
      @(negedge clk);
    end
    cfg_en = 0;
  endtask

  task automatic chk(string n, logic [3:0] got, logic [3:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s=%h expected %h at %0t", n, got, e, $time);
    end
  endtask

  // source numbers: 0 zero, 1 one, 2 s_up, 3 c_up, 4 s_upl, 5 s_upr,
  // 6 c_r, 7/8 row lines, 9/10 column lines
  initial begin
    logic [3:0] a, b, sum, exp_q;
    logic [4:0] full;
    logic       r;
    logic [3:0] s1_hist [3];
    logic       l7_prev;

    // ---------------- P1
    bits = '0;
    for (int x = 0; x < 4; x++) begin
      bits[(0*4+x)*19 +: 19] = word(0, 9, 10, x == 0 ? 0 : 6, 0);
      bits[(1*4+x)*19 +: 19] = word(4, 2, 7, 0, 0);
      bits[(2*4+x)*19 +: 19] = word(6, 2, 0, 0, 0);
      bits[(3*4+x)*19 +: 19] = word(0, 2, 0, x == 0 ? 1 : 6, 0);
    end
    bits[304 +: 4] = 4'hF;
    bits[308 +: 4] = 4'h0;
    for (int g = 0; g < 2; g++) begin
      bits[W1 + (0*2+g)*19 +: 19] = word(0, 9, 10, 6, 0);
      bits[W1 + (1*2+g)*19 +: 19] = word(4, 2, 7, 0, 0);
      bits[W1 + (2*2+g)*19 +: 19] = word(6, 2, 0, 0, 0);
      bits[W1 + (3*2+g)*19 +: 19] = word(0, 2, 0, 6, 0);
    end
    bits[W1 + 152 +: 8] = 8'hFF;
    bits[W1 + 160 +: 8] = 8'h00;
    north_s = '0; north_c = '0; east_c = '0; east_c2 = 4'b1000;
    bc_row = '0; bc_col = '0;
    load();
    rst_n = 1;
    for (int v = 0; v < 200; v++) begin
      a = 4'($urandom); b = 4'($urandom); r = 1'($urandom);
      bc_col = {b, a};
      bc_row = {6'b0, r, 1'b0};
      #1;
      full = a + b;
      chk("P1 west_c[0] carry out of A+B", {3'b0, west_c[0]}, {3'b0, full[4]});
      chk("P1 dut2 west_c[0]", {3'b0, west_c2[0]}, {3'b0, full[4]});
      exp_q = (full[3:0] ^ {4{r}}) + 4'd1;
      @(posedge clk); #1;
      chk("P1 south_s", south_s, exp_q);
      chk("P1 dut2 south_s", south_s2, exp_q);
      @(negedge clk);
    end

    // ---------------- P2 (dut2 keeps P1)
    for (int x = 0; x < 4; x++) begin
      bits[(0*4+x)*19 +: 19] = word(0, 2, 3, 6, 0);
      bits[(1*4+x)*19 +: 19] = word(4, 4, 5, 0, 0);
      bits[(2*4+x)*19 +: 19] = word(6, 2, 0, 0, 0);
      bits[(3*4+x)*19 +: 19] = word(2, 2, 8, 0, 0);
    end
    bits[304 +: 4] = 4'hF;
    bits[308 +: 4] = 4'hF;
    load();
    for (int k = 0; k < 3; k++) s1_hist[k] = '0;
    l7_prev = 0;
    for (int v = 0; v < 200; v++) begin
      logic [3:0] s0, s1;
      north_s = 4'($urandom); north_c = 4'($urandom); east_c = 4'($urandom);
      bc_row = 8'($urandom);
      #1;
      full = north_s + north_c + east_c[0];
      s0 = full[3:0];
      s1 = {1'b0, s0[3:1]} ^ {s0[2:0], 1'b0};
      chk("P2 west_c[0]", {3'b0, west_c[0]}, {3'b0, full[4]});
      s1_hist[2] = s1_hist[1]; s1_hist[1] = s1_hist[0]; s1_hist[0] = s1;
      if (v >= 2) chk("P2 south_s", south_s, s1_hist[2] & {4{l7_prev}});
      l7_prev = bc_row[7];
      @(posedge clk);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
