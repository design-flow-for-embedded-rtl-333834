// tb_drb_mux: random sources and every select value of a DRB multiplexer;
// out-of-range selects must give 0.
module tb_drb_mux;
  int checks = 0, failures = 0;
  logic [10:0] src;
  logic [3:0]  sel;
  logic        y;

  drb_mux #(.NSRC(11), .SW(4)) dut (.src, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      src = 11'($urandom);
      for (int k = 0; k < 16; k++) begin
        logic e;
        sel = 4'(k);
        #1;
        e = (k < 11) ? src[k] : 1'b0;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL src=%b sel=%0d y=%b expected %b", src, k, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
