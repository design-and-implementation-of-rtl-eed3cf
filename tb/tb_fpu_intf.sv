// tb_fpu_intf: random set/clear traffic on the FP-register scoreboard and
// random response flags, against a model: busy bits set on issue, cleared by
// either write-back port, and sticky accumulation of flags only on accepted
// responses; synchronous reset clears everything.
module tb_fpu_intf;
  logic        clk = 0, rst_n = 0, set_en = 0, clr_a_en = 0, clr_b_en = 0;
  logic [4:0]  set_rd = 0, clr_a_rd = 0, clr_b_rd = 0, flags_in = 0, fflags;
  logic [31:0] busy, mbusy;
  logic [4:0]  mflags;
  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  fpu_intf dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1;
    chk(busy == 0 && fflags == 0, "reset");
    rst_n = 1; mbusy = 0; mflags = 0;
    for (int i = 0; i < 3000; i++) begin
      set_en = 1'($urandom); set_rd = 5'($urandom);
      clr_a_en = 1'($urandom); clr_a_rd = 5'($urandom);
      clr_b_en = 1'($urandom); clr_b_rd = 5'($urandom);
      flags_in = ($urandom_range(3) == 0) ? 5'(1 << $urandom_range(4)) : 5'd0;
      @(posedge clk); #1;
      if (set_en) mbusy[set_rd] = 1;
      if (clr_a_en) mbusy[clr_a_rd] = 0;
      if (clr_b_en) begin mbusy[clr_b_rd] = 0; mflags |= flags_in; end
      chk(busy == mbusy, "scoreboard");
      chk(fflags == mflags, "sticky flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
