// tb_efpga_top: end-to-end run of the default 2 x 2 tile fabric.
//
// A bitstream built here is shifted through the whole configuration chain;
// it maps this small datapath onto the fabric:
//  * an 8-bit adder split over clusters (1,0) (bits 3:0) and (0,0)
//    (bits 7:4), the carry crossing the cluster border on the local carry
//    chain. Operands enter at the west edge of channel row 0: the high
//    halves on periodic tracks (one shared window rank for all lines), the
//    low halves on fully connected tracks that pass straight through routing
//    switch (0,0). Sums are registered in register stage 0.
//  * the high sum is driven by the H-CB of tile (0,1) onto odd tracks, leaves
//    at the west edge and, turned south by switch points of routing switch
//    (0,1), at the south edge; the low sum leaves at the east edge through
//    routing switch (1,1).
//  * the carry into bit 4 is driven by the V-CB of tile (0,0) onto a
//    periodic track and runs straight south through routing switch (0,1).
//  * cluster (1,1) XORs four row-line bits D from the south edge (V-CB
//    lines, periodic window); cluster (0,1) takes the column lines of
//    cluster (0,0) through its column feedthrough and row line 3 of cluster
//    (1,1) through its row feedthrough and computes A_hi ^ B_hi ^ D3,
//    registered in its register stage 1.
// Every check compares with values computed here; the count of each
// mechanism exercised is reported, and one never exercised is a failure.
module tb_efpga_top;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  int n_cfg_load = 0, n_cb_periodic = 0, n_cb_full = 0, n_cb_drive_h = 0, n_cb_drive_v = 0;
  int n_rs_ew = 0, n_rs_turn = 0, n_rs_ns = 0, n_ft_col = 0, n_ft_row = 0;
  int n_carry_cross = 0, n_reg = 0, n_carry_out = 0;

  logic clk = 0, rst_n = 0, run = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [1:0][31:0] edge_n_in, edge_n_out, edge_s_in, edge_s_out;
  logic [1:0][31:0] edge_w_in, edge_w_out, edge_e_in, edge_e_out;
  logic [1:0][3:0]  south_s, south_c, west_s, west_c;

  efpga_top dut (.clk, .rst_n, .run, .cfg_en, .cfg_in, .cfg_out,
    .edge_n_in, .edge_n_out, .edge_s_in, .edge_s_out,
    .edge_w_in, .edge_w_out, .edge_e_in, .edge_e_out,
    .south_s, .south_c, .west_s, .west_c);

  // Layout worked out by hand for the defaults: RS 128 bits, H-CB and V-CB
  // 160 each, feedthroughs 8 each, cluster 312: 776 per tile, 4 tiles.
  localparam int TW = 776, NB = 4 * TW;
  localparam int O_RS = 0, O_HCB = 128, O_VCB = 288, O_FTC = 448, O_FTR = 456, O_CL = 464;
  logic [NB-1:0] bits;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tile(int i, int j);
    return (j * 2 + i) * TW;
  endfunction
  // Bit of connection c (0 ns, 1 ew, 2 ne, 3 es, 4 sw, 5 wn) of switch point k.
  function automatic int rs_bit(int i, int j, int k, int c);
    int off = (k % 2 == 0) ? (k / 2) * 8 : (k / 2) * 8 + 2;
    return tile(i, j) + O_RS + off + c;
  endfunction
  function automatic logic [18:0] word(int f, int sa, int sb, int sc, int sg);
    return {3'(f), 4'(sg), 4'(sc), 4'(sb), 4'(sa)};
  endfunction
  task automatic set_le(int i, int j, int y, int x, logic [18:0] w);
    bits[tile(i, j) + O_CL + (y*4 + x)*19 +: 19] = w;
  endtask

  task automatic chk(string n, logic [7:0] got, logic [7:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s = %h expected %h at %0t", n, got, e, $time);
    end
  endtask

  task automatic need(string n, int cnt);
    $display("mechanism %-28s %0d", n, cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", n);
    end
  endtask

  function automatic logic [3:0] odd4(logic [31:0] v);
    return {v[15], v[13], v[11], v[9]};
  endfunction

  initial begin
    logic [7:0] a, b, sum_prev, hi_x_prev;
    logic [8:0] full;
    logic [3:0] d;
    logic       c4;
    int         cycles;

    bits = '0;
    // ---- H-CB (0,0): col lines of cluster (0,0) from periodic tracks 16+l
    for (int l = 0; l < 8; l++) bits[tile(0,0) + O_HCB + l*4 +: 4] = 4'd9;
    // ---- RS (0,0): tracks 8..15 straight east-west
    for (int k = 8; k < 16; k++) bits[rs_bit(0,0,k,1)] = 1'b1;
    // ---- H-CB (1,0): col lines from fully connected tracks 8+l (rank l+1)
    for (int l = 0; l < 8; l++) bits[tile(1,0) + O_HCB + l*4 +: 4] = 4'(l + 1);
    // ---- clusters (0,0), (1,0): row 0 add, rows 1-3 pass, stage 0 registered
    for (int i = 0; i < 2; i++) begin
      for (int x = 0; x < 4; x++) begin
        set_le(i, 0, 0, x, word(0, 9, 10, 6, 0));
        set_le(i, 0, 1, x, word(6, 2, 0, 0, 0));
        set_le(i, 0, 2, x, word(6, 2, 0, 0, 0));
        set_le(i, 0, 3, x, word(6, 2, 0, 0, 0));
      end
      bits[tile(i,0) + O_CL + 304 +: 4] = 4'hF;
    end
    // ---- H-CB (0,1) and (1,1): drive sum x (output x, rank x+1) on track 9+2x
    for (int x = 0; x < 4; x++) begin
      bits[tile(0,1) + O_HCB + 32 + (9+2*x)*4 +: 4] = 4'(x + 1);
      bits[tile(1,1) + O_HCB + 32 + (9+2*x)*4 +: 4] = 4'(x + 1);
      bits[rs_bit(0,1,9+2*x,4)] = 1'b1;   // RS (0,1): turn west -> south
      bits[rs_bit(1,1,9+2*x,1)] = 1'b1;   // RS (1,1): straight to the east edge
    end
    // ---- V-CB (0,0): drive carry output 4 (west_c row 0 of cluster (1,0))
    //      on periodic track 21 (rank 1); RS (0,1) passes it north-south
    bits[tile(0,0) + O_VCB + 32 + 21*4 +: 4] = 4'd1;
    bits[rs_bit(0,1,21,0)] = 1'b1;
    // ---- V-CB (1,1): row lines y from periodic tracks 16+y
    for (int l = 0; l < 4; l++) bits[tile(1,1) + O_VCB + l*4 +: 4] = 4'd9;
    // ---- cluster (1,1): parity of the four row lines
    for (int x = 0; x < 4; x++) begin
      set_le(1, 1, 0, x, word(6, 7, 0, 0, 0));
      for (int y = 1; y < 4; y++) set_le(1, 1, y, x, word(4, 2, 7, 0, 0));
    end
    // ---- cluster (0,1): col lines through the feedthrough, row 3 line through
    //      the row feedthrough; XOR, XOR; stage 1 registered
    bits[tile(0,1) + O_FTC +: 8] = 8'hFF;
    bits[tile(0,1) + O_FTR +: 8] = 8'hFF;
    for (int x = 0; x < 4; x++) begin
      set_le(0, 1, 0, x, word(4, 9, 10, 0, 0));
      set_le(0, 1, 1, x, word(6, 2, 0, 0, 0));
      set_le(0, 1, 2, x, word(6, 2, 0, 0, 0));
      set_le(0, 1, 3, x, word(4, 2, 7, 0, 0));
    end
    bits[tile(0,1) + O_CL + 308 +: 4] = 4'hF;

    edge_n_in = '0; edge_s_in = '0; edge_w_in = '0; edge_e_in = '0;
    // ---- load the chain: cfg_in feeds tile 0's RS, so the last bit of the
    //      chain goes in first
    cycles = 0;
    @(negedge clk);
    cfg_en = 1;
    for (int i = NB - 1; i >= 0; i--) begin
      cfg_in = bits[i];
      @(negedge clk);
      cycles++;
    end
    cfg_en = 0;
    checks++;
    if (cycles != NB) begin failures++; $display("FAIL load cycles %0d", cycles); end
    // The chain output now shows the bits shifted in after the first NB.
    n_cfg_load++;
    rst_n = 1;
    run = 1;

    sum_prev = '0;
    hi_x_prev = '0;
    for (int v = 0; v < 400; v++) begin
      a = 8'($urandom); b = 8'($urandom); d = 4'($urandom);
      if (v % 50 == 7) begin a = 8'hFF; b = 8'h01; end
      edge_w_in = '0;
      edge_w_in[0][19:16] = a[7:4];
      edge_w_in[0][23:20] = b[7:4];
      edge_w_in[0][11:8]  = a[3:0];
      edge_w_in[0][15:12] = b[3:0];
      edge_n_in = {$urandom, $urandom};
      edge_e_in = {$urandom, $urandom};
      edge_s_in = '0;
      edge_s_in[1][19:16] = d;
      #1;
      full = a + b;
      c4 = (a[3:0] + b[3:0]) > 15;
      // combinational paths
      chk("carry out (west_c)", {7'b0, west_c[0][0]}, {7'b0, full[8]});
      chk("carry into bit 4 on track 21", {7'b0, edge_s_out[0][21]}, {7'b0, c4});
      chk("row-line parity", {4'b0, south_s[1]}, {4'b0, {4{^d}}});
      if (full[8]) n_carry_out++;
      if (c4) n_carry_cross++;
      n_cb_drive_v++; n_rs_ns++; n_cb_periodic++;
      // registered paths still show the previous operands before the edge
      chk("low sum before edge", {4'b0, odd4(edge_e_out[1])}, {4'b0, sum_prev[3:0]});
      if (sum_prev[3:0] != full[3:0]) n_reg++;
      @(posedge clk); #1;
      chk("high sum, west edge", {4'b0, odd4(edge_w_out[1])}, {4'b0, full[7:4]});
      chk("high sum, south edge after turn", {4'b0, odd4(edge_s_out[0])}, {4'b0, full[7:4]});
      chk("low sum, east edge", {4'b0, odd4(edge_e_out[1])}, {4'b0, full[3:0]});
      chk("feedthrough xor", {4'b0, south_s[0]}, {4'b0, a[7:4] ^ b[7:4] ^ {4{d[3]}}});
      n_cb_full++; n_cb_drive_h++; n_rs_ew++; n_rs_turn++; n_ft_col++; n_ft_row++;
      sum_prev = full[7:0];
      @(negedge clk);
    end
    need("configuration load", n_cfg_load);
    need("CB periodic window lines", n_cb_periodic);
    need("CB fully connected lines", n_cb_full);
    need("CB drive (H-CB)", n_cb_drive_h);
    need("CB drive (V-CB)", n_cb_drive_v);
    need("RS straight e-w", n_rs_ew);
    need("RS straight n-s", n_rs_ns);
    need("RS turn w-s", n_rs_turn);
    need("feedthrough column lines", n_ft_col);
    need("feedthrough row lines", n_ft_row);
    need("carry across clusters", n_carry_cross);
    need("carry out of datapath", n_carry_out);
    need("register stage holds value", n_reg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
