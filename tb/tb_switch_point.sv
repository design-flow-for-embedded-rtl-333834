// tb_switch_point: exhaustive enables and inputs for a type 2 switch point
// and a type 1 switch point (straight only: turn enables must do nothing).
module tb_switch_point;
  import efpga_pkg::*;

  int checks = 0, failures = 0;
  sp_conn_t en;
  logic in_n, in_e, in_s, in_w;
  logic [3:0] o2, o1;

  switch_point #(.CONN(SP_TYPE2)) dut2 (.en, .in_n, .in_e, .in_s, .in_w,
    .out_n(o2[0]), .out_e(o2[1]), .out_s(o2[2]), .out_w(o2[3]));
  switch_point #(.CONN(SP_TYPE1)) dut1 (.en, .in_n, .in_e, .in_s, .in_w,
    .out_n(o1[0]), .out_e(o1[1]), .out_s(o1[2]), .out_w(o1[3]));

  // Expected outputs {w,s,e,n} for connection enables m (ns,ew,ne,es,sw,wn).
  function automatic logic [3:0] ref_out(logic [5:0] m, logic n, logic e, logic s, logic w);
    logic on, oe, os, ow;
    on = (m[0] & s) | (m[2] & e) | (m[5] & w);
    os = (m[0] & n) | (m[3] & e) | (m[4] & w);
    oe = (m[1] & w) | (m[2] & n) | (m[3] & s);
    ow = (m[1] & e) | (m[5] & n) | (m[4] & s);
    return {ow, os, oe, on};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 64; m++) begin
      for (int v = 0; v < 16; v++) begin
        en = 6'(m);
        {in_w, in_s, in_e, in_n} = 4'(v);
        #1;
        checks++;
        if (o2 !== ref_out(6'(m), in_n, in_e, in_s, in_w)) begin
          failures++;
          $display("FAIL type2 en=%b in=%b out=%b", en, v, o2);
        end
        checks++;
        if (o1 !== ref_out(6'(m) & 6'b000011, in_n, in_e, in_s, in_w)) begin
          failures++;
          $display("FAIL type1 en=%b in=%b out=%b", en, v, o1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
