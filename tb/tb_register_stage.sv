// tb_register_stage: registered bits follow d one cycle later (and hold while
// en is low, clear on reset); bypassed bits follow d at once. A second
// instance built with latches must be transparent while clk and en are high
// and hold while clk is low.
module tb_register_stage;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] cfg, d, q;
  logic [3:0] prev;

  register_stage #(.N(4)) dut (.clk, .rst_n, .en, .cfg, .d, .q);

  logic [3:0] dl, ql, held;
  register_stage #(.N(4), .LATCH(1'b1)) dut_l (.clk, .rst_n, .en, .cfg, .d(dl), .q(ql));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [3:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, e);
    end
  endtask

  task automatic check_l(string what);
    checks++;
    if (ql !== ((cfg & held) | (~cfg & dl))) begin
      failures++;
      $display("FAIL latch %s: q=%b expected %b", what, ql, (cfg & held) | (~cfg & dl));
    end
  endtask

  initial begin
    cfg = 4'b0101;
    d = 4'b1111;
    dl = 4'b1111;
    held = '0;
    #1;
    check(4'b1010, "reset");
    check_l("reset");
    @(negedge clk); rst_n = 1; en = 1;
    prev = '0;
    for (int r = 0; r < 200; r++) begin
      logic [3:0] nd;
      nd = 4'($urandom);
      if (r % 17 == 0) cfg = 4'($urandom);
      d = nd;
      #1;
      check((cfg & prev) | (~cfg & d), "before edge");
      @(posedge clk); #1;
      if (en) prev = d;
      check((cfg & prev) | (~cfg & d), "after edge");
      en = (r % 5 != 3);
      @(negedge clk);
    end
    // latch type: clk is low here; one high phase loads a known value
    en = 1;
    dl = 4'($urandom);
    @(posedge clk); #1;
    held = dl;
    @(negedge clk);
    for (int r = 0; r < 100; r++) begin
      if (r % 13 == 0) cfg = 4'($urandom);
      dl = 4'($urandom); #1;
      check_l("clk low, d changed");
      @(posedge clk); #1;
      if (en) held = dl;
      check_l("clk rose");
      dl = 4'($urandom); #1;
      if (en) held = dl;
      check_l("clk high, d changed");
      @(negedge clk); #1;
      check_l("clk fell");
      dl = 4'($urandom); #1;
      check_l("clk low, d changed again");
      en = (r % 4 != 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
