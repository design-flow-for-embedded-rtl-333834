// tb_le_core: exhaustive check of the LE core logic. Every function code and
// every operand combination is applied, and the outputs are compared with
// truth-table values worked out here. A second instance with a reduced
// function list checks that left-out functions give zeros.
module tb_le_core;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  le_func_e func;
  logic a, b, c, g;
  logic s, co, s2, co2;

  le_core #(.FUNCS(8'h03)) dut_small (.func, .a, .b, .c, .g, .s(s2), .co(co2));
  le_core dut (.func, .a, .b, .c, .g, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 16; v++) begin
        int es, ec, n;
        func = le_func_e'(f);
        {g, c, b, a} = 4'(v);
        #1;
        es = 0; ec = 0;
        case (f)
          0: begin n = a + b + c;         es = n % 2; ec = n / 2; end
          1: begin n = (a && g) + b + c;  es = n % 2; ec = n / 2; end
          2: es = a && b;
          3: es = a || b;
          4: es = (a != b);
          5: es = g ? b : a;
          6: es = a;
          default: es = 0;
        endcase
        checks++;
        if (s !== 1'(es) || co !== 1'(ec)) begin
          failures++;
          $display("FAIL func=%0d a=%b b=%b c=%b g=%b: s=%b co=%b expected %0d %0d", f, a, b, c, g, s, co, es, ec);
        end
        checks++;
        if (f < 2 ? (s2 !== 1'(es) || co2 !== 1'(ec)) : (s2 !== 1'b0 || co2 !== 1'b0)) begin
          failures++;
          $display("FAIL reduced list func=%0d", f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
