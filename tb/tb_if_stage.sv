// tb_if_stage: program-counter sequencing: reset value, +4 per cycle, hold on
// stall, load of the redirect target (which wins over a stall).
module tb_if_stage;
  logic        clk = 0, rst_n = 0, stall = 0, redirect = 0;
  logic [31:0] target = 0, pc, model;
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
  if_stage dut (.clk, .rst_n, .stall, .redirect, .target, .pc);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1;
    chk(pc == 0, "reset PC");
    rst_n = 1; model = 0;
    for (int i = 0; i < 2000; i++) begin
      stall = ($urandom_range(3) == 0);
      redirect = ($urandom_range(5) == 0);
      target = $urandom & ~32'd3;
      @(posedge clk); #1;
      model = redirect ? target : stall ? model : model + 4;
      chk(pc == model, "PC sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
