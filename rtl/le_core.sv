// le_core: core logic of a logic element.
//
// The core computes one of a list of elementary boolean functions on the
// operands a, b, c (carry in) and g (gate) chosen by the element's dedicated
// routing block. Full addition and gated full addition (the partial-product
// cell of an array multiplier) are the functions the architecture names;
// AND, OR, XOR, a 2:1 multiplexer and a pass-through are added here as the
// simplest further functions. The FUNCS parameter is the list of functions
// this core supports (bit i for le_func_e value i): a function left out of
// the list yields zeros, as its logic is not built.
//
// Output s is the function's result, co the carry for the two adder
// functions and 0 otherwise. Purely combinational.
module le_core
  import efpga_pkg::*;
#(
  parameter logic [7:0] FUNCS = 8'h7F
) (
  input  le_func_e func,
  input  logic     a,
  input  logic     b,
  input  logic     c,
  input  logic     g,
  output logic     s,
  output logic     co
);

  logic ag;
  assign ag = a & g;

  always_comb begin
    s  = 1'b0;
    co = 1'b0;
    if (FUNCS[func]) begin
      unique case (func)
        LE_FA:   begin s = a ^ b ^ c;  co = (a & b) | (a & c) | (b & c);    end
        LE_GFA:  begin s = ag ^ b ^ c; co = (ag & b) | (ag & c) | (b & c); end
        LE_AND:  s = a & b;
        LE_OR:   s = a | b;
        LE_XOR:  s = a ^ b;
        LE_MUX:  s = g ? b : a;
        LE_PASS: s = a;
        LE_OFF:  s = 1'b0;
      endcase
    end
  end

endmodule
