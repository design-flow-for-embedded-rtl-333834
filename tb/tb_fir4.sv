// tb_fir4: a 4-tap FIR filter mapped onto the default 2 x 2 tile fabric by a
// bitstream built here, then run on random samples.
//
//   y[n] = x[n] + 2 x[n-1] + 2 x[n-2] + x[n-3],  x: 4-bit unsigned, y: 8 bits
//
// Transposed form, one function slice per row of LEs, 8 bit slices (cluster
// column 1 holds bits 3:0, column 0 bits 7:4), 8 function slices (two tile
// rows of four LE rows):
//   row 0  pass x                 row 1  pass,  register stage: z3 = x
//   row 2  2x + z3 (ripple add)   row 3  pass,  register stage: z2
//   row 4  2x + z2                row 5  pass,  register stage: z1
//   row 6  x + z1                 row 7  pass,  stage bypassed: y
// x enters at the west edge on fully connected tracks 8..11 and passes
// straight through routing switch (0,0); the connection boxes above the top
// clusters select x (weight 1) onto column line 0 and the shifted 2x onto
// column line 1 by their track choice. The lower clusters reach the same
// column lines through their column feedthrough stages. y is read at the
// bottom-row cluster outputs. The coefficients and word widths are chosen
// for this test; the expected y is computed here from the sample history.
module tb_fir4;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [1:0][31:0] edge_n_in, edge_n_out, edge_s_in, edge_s_out;
  logic [1:0][31:0] edge_w_in, edge_w_out, edge_e_in, edge_e_out;
  logic [1:0][3:0]  south_s, south_c, west_s, west_c;

  efpga_top dut (.clk, .rst_n, .run, .cfg_en, .cfg_in, .cfg_out,
    .edge_n_in, .edge_n_out, .edge_s_in, .edge_s_out,
    .edge_w_in, .edge_w_out, .edge_e_in, .edge_e_out,
    .south_s, .south_c, .west_s, .west_c);

  // Configuration layout of the default fabric (see tb_efpga_top).
  localparam int TW = 776, NB = 4 * TW;
  localparam int O_RS = 0, O_HCB = 128, O_FTC = 448, O_CL = 464;
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
  function automatic logic [18:0] word(int f, int sa, int sb, int sc, int sg);
    return {3'(f), 4'(sg), 4'(sc), 4'(sb), 4'(sa)};
  endfunction
  task automatic set_row(int j, int y, logic [18:0] w);
    for (int i = 0; i < 2; i++)
      for (int x = 0; x < 4; x++)
        bits[tile(i, j) + O_CL + (y*4 + x)*19 +: 19] = w;
  endtask

  initial begin
    logic [3:0] xs [4];
    logic [7:0] e;
    bits = '0;
    // routing switch (0,0): tracks 8..11 straight e-w (even k: ew at +1,
    // odd k: ew at +1 after the type-2 offset)
    for (int k = 8; k < 12; k++)
      bits[tile(0,0) + O_RS + ((k % 2 == 0) ? (k/2)*8 : (k/2)*8 + 2) + 1] = 1'b1;
    // H-CB (1,0), bits 3:0: line x = x[x] (track 8+x, rank x+1);
    // line 4+x = x[x-1] (2x)
    for (int x = 0; x < 4; x++) begin
      bits[tile(1,0) + O_HCB + x*4 +: 4] = 4'(x + 1);
      bits[tile(1,0) + O_HCB + (4+x)*4 +: 4] = 4'(x);
    end
    // H-CB (0,0), bits 7:4: only line 4 (2x, bit 4) = x[3]
    bits[tile(0,0) + O_HCB + 4*4 +: 4] = 4'd4;
    // column feedthroughs of the lower tiles
    bits[tile(0,1) + O_FTC +: 8] = 8'hFF;
    bits[tile(1,1) + O_FTC +: 8] = 8'hFF;
    // upper clusters
    set_row(0, 0, word(6, 9, 0, 0, 0));     // pass x
    set_row(0, 1, word(6, 2, 0, 0, 0));     // pass
    set_row(0, 2, word(0, 10, 2, 6, 0));    // 2x + z3
    set_row(0, 3, word(6, 2, 0, 0, 0));
    // lower clusters
    set_row(1, 0, word(0, 10, 2, 6, 0));    // 2x + z2
    set_row(1, 1, word(6, 2, 0, 0, 0));
    set_row(1, 2, word(0, 9, 2, 6, 0));     // x + z1
    set_row(1, 3, word(6, 2, 0, 0, 0));
    for (int i = 0; i < 2; i++) begin
      bits[tile(i,0) + O_CL + 304 +: 8] = 8'hFF;  // both stages registered
      bits[tile(i,1) + O_CL + 304 +: 4] = 4'hF;   // z1 registered, y not
    end

    edge_n_in = '0; edge_s_in = '0; edge_w_in = '0; edge_e_in = '0;
    @(negedge clk);
    cfg_en = 1;
    for (int i = NB - 1; i >= 0; i--) begin
      cfg_in = bits[i];
      @(negedge clk);
    end
    cfg_en = 0;
    rst_n = 1;
    run = 1;

    for (int k = 0; k < 4; k++) xs[k] = '0;
    for (int n = 0; n < 500; n++) begin
      xs[3] = xs[2]; xs[2] = xs[1]; xs[1] = xs[0];
      xs[0] = (n % 97 == 5) ? 4'hF : 4'($urandom);
      if (n >= 60 && n < 64) xs[0] = 4'hF;   // largest output, 90
      edge_w_in = '0;
      edge_w_in[0][11:8] = xs[0];
      #1;
      e = 8'(xs[0]) + 8'(2 * xs[1]) + 8'(2 * xs[2]) + 8'(xs[3]);
      checks++;
      if ({south_s[0], south_s[1]} !== e) begin
        failures++;
        $display("FAIL n=%0d y=%0d expected %0d", n, {south_s[0], south_s[1]}, e);
      end
      @(posedge clk);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
