// tb_feedthrough: loads random select patterns through the configuration
// chain and checks that each line takes the neighbour's line where its
// select bit is 1 and the connection box line otherwise.
module tb_feedthrough;
  int checks = 0, failures = 0;
  logic clk = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [7:0] cb_line, nb_line, line, sel;

  feedthrough #(.N(8)) dut (.clk, .cfg_en, .cfg_in, .cfg_out, .cb_line, .nb_line, .line);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      sel = (r == 0) ? 8'h00 : (r == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      cfg_en = 1;
      for (int b = 7; b >= 0; b--) begin
        cfg_in = sel[b];
        @(negedge clk);
      end
      cfg_en = 0;
      for (int k = 0; k < 10; k++) begin
        cb_line = 8'($urandom);
        nb_line = 8'($urandom);
        #1;
        checks++;
        if (line !== ((sel & nb_line) | (~sel & cb_line))) begin
          failures++;
          $display("FAIL sel=%b cb=%b nb=%b line=%b", sel, cb_line, nb_line, line);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
