// tb_cfg_sram: two chained 13-bit blocks are loaded with a random 26-bit
// pattern; each block's contents, the chain output delay and the hold with
// cfg_en low are checked.
module tb_cfg_sram;
  int checks = 0, failures = 0;
  logic clk = 0, cfg_en = 0, cfg_in = 0;
  logic mid, cfg_out;
  logic [12:0] q0, q1;
  logic [25:0] pat;

  cfg_sram #(.W(13)) u0 (.clk, .cfg_en, .cfg_in, .cfg_out(mid), .q(q0));
  cfg_sram #(.W(13)) u1 (.clk, .cfg_en, .cfg_in(mid), .cfg_out, .q(q1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 10; r++) begin
      pat = 26'($urandom);
      @(negedge clk);
      cfg_en = 1;
      for (int b = 25; b >= 0; b--) begin
        cfg_in = pat[b];
        @(negedge clk);
      end
      cfg_en = 0;
      checks++;
      if ({q1, q0} !== pat) begin
        failures++;
        $display("FAIL load: got %h expected %h", {q1, q0}, pat);
      end
      checks++;
      if (cfg_out !== pat[25]) begin failures++; $display("FAIL cfg_out"); end
      cfg_in = ~cfg_in;
      repeat (3) @(negedge clk);
      checks++;
      if ({q1, q0} !== pat) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
