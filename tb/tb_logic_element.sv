// tb_logic_element: random configurations and inputs for one logic element.
// The expected result is computed here from the source numbering (0, 1,
// sum/carry above, sum above-left, sum above-right, carry right, row lines,
// column lines) and the function truth tables.
module tb_logic_element;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  logic s_up, c_up, s_upl, s_upr, c_r;
  logic [1:0] bc_row, bc_col;
  logic [18:0] cfg;
  logic s, co;

  logic_element #(.BC_ROW(2), .BC_COL(2)) dut (
    .s_up, .c_up, .s_upl, .s_upr, .c_r, .bc_row, .bc_col, .cfg, .s, .co);

  function automatic logic pick(int k, logic [10:0] v);
    return (k < 11) ? v[k] : 1'b0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3000; r++) begin
      logic [10:0] v;
      int sa, sb, sc, sg, f, a, b, c, g, es, ec, n;
      {s_up, c_up, s_upl, s_upr, c_r} = 5'($urandom);
      bc_row = 2'($urandom);
      bc_col = 2'($urandom);
      sa = $urandom % 11; sb = $urandom % 11; sc = $urandom % 11; sg = $urandom % 11;
      f = $urandom % 7;
      cfg = {3'(f), 4'(sg), 4'(sc), 4'(sb), 4'(sa)};
      #1;
      v = {bc_col[1], bc_col[0], bc_row[1], bc_row[0], c_r, s_upr, s_upl, c_up, s_up, 1'b1, 1'b0};
      a = pick(sa, v); b = pick(sb, v); c = pick(sc, v); g = pick(sg, v);
      es = 0; ec = 0;
      case (f)
        0: begin n = a + b + c;       es = n % 2; ec = n / 2; end
        1: begin n = (a & g) + b + c; es = n % 2; ec = n / 2; end
        2: es = a & b;
        3: es = a | b;
        4: es = a ^ b;
        5: es = g ? b : a;
        default: es = a;
      endcase
      checks++;
      if (s !== 1'(es) || co !== 1'(ec)) begin
        failures++;
        $display("FAIL cfg=%h v=%b: s=%b co=%b expected %0d %0d", cfg, v, s, co, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
