// tb_int_regfile: random writes and reads against a model: x0 stays zero,
// written values read back, and a same-cycle write is visible to a read of
// the same register.
module tb_int_regfile;
  logic        clk = 0, we = 0;
  logic [4:0]  ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0;
  logic [31:0] model [32];
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
  int_regfile dut (.clk, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  always #5 clk = ~clk;
  function automatic logic [31:0] expv(input logic [4:0] r);
    if (r == 0) return 0;
    if (we && wa == r) return wd;
    return model[r];
  endfunction
  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; wa = 5'(i); wd = 32'(i * 7 + 1);
      model[i] = 32'(i * 7 + 1);
    end
    model[0] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = ($urandom_range(3) == 0) ? wa : 5'($urandom);
      #1;
      chk(rd1 == expv(ra1) && rd2 == expv(ra2), "read ports");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
