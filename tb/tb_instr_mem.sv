// tb_instr_mem: loads random words through the write port and reads them
// back through the fetch port at their byte addresses, including the
// wrap-around of addresses beyond the memory size.
module tb_instr_mem;
  logic        clk = 0, we = 0;
  logic [31:0] waddr = 0, wdata = 0, raddr = 0, rdata;
  logic [31:0] model [256];
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
  instr_mem #(.WORDS(256)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      @(negedge clk); we = 1; waddr = 32'(i * 4); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = int'($urandom_range(1023));
      raddr = 32'(k * 4); #1;
      chk(rdata == model[k % 256], $sformatf("read word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
