// tb_data_mem: random byte, halfword and word writes with byte enables
// against a byte-array model; reads through both the access port and the
// debug port.
module tb_data_mem;
  logic        clk = 0, we = 0;
  logic [3:0]  be = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, dbg_addr = 0, dbg_rdata;
  logic [7:0]  model [1024];
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
  data_mem #(.WORDS(256)) dut (.clk, .we, .be, .addr, .wdata, .rdata, .dbg_addr, .dbg_rdata);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; be = 4'hF; addr = 32'(i * 4); wdata = 0;
    end
    for (int i = 0; i < 1024; i++) model[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); be = 4'($urandom); addr = 32'($urandom_range(1023)) & ~32'd3; wdata = $urandom;
      if (we) for (int j = 0; j < 4; j++) if (be[j]) model[addr + j] = wdata[8*j +: 8];
      @(negedge clk); we = 0;
      addr = 32'($urandom_range(1023)) & ~32'd3;
      dbg_addr = 32'($urandom_range(1023)) & ~32'd3;
      #1;
      chk(rdata == {model[addr+3], model[addr+2], model[addr+1], model[addr]}, "port read");
      chk(dbg_rdata == {model[dbg_addr+3], model[dbg_addr+2], model[dbg_addr+1], model[dbg_addr]}, "debug read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
