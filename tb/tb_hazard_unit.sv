// tb_hazard_unit: random input combinations against the stall/flush rules:
// load-use and pending-FP stalls hold IF/ID and insert a bubble into EX, an
// unaccepted coprocessor request freezes IF..EX and bubbles MEM, a redirect
// flushes IF/ID and ID/EX.
module tb_hazard_unit;
  logic       id_valid, id_uses_rs1, id_uses_rs2, idex_valid, idex_mem_read, idex_reg_write;
  logic [4:0] id_rs1, id_rs2, idex_rd;
  logic       fp_pending, x_stall, redirect;
  logic       load_use, stall_pc, stall_ifid, flush_ifid, stall_idex, bubble_idex, bubble_exmem;
  int         n_lu = 0;
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
  hazard_unit dut (.*);
  initial begin
    logic lu, hz;
    for (int i = 0; i < 5000; i++) begin
      {id_valid, id_uses_rs1, id_uses_rs2, idex_valid, idex_mem_read, idex_reg_write} = 6'($urandom);
      id_rs1 = 5'($urandom_range(3)); id_rs2 = 5'($urandom_range(3)); idex_rd = 5'($urandom_range(3));
      fp_pending = 1'($urandom); redirect = ($urandom_range(3) == 0);
      x_stall = !redirect && ($urandom_range(3) == 0);
      #1;
      lu = id_valid && idex_valid && idex_mem_read && idex_reg_write && idex_rd != 0 &&
           ((id_uses_rs1 && id_rs1 == idex_rd) || (id_uses_rs2 && id_rs2 == idex_rd));
      hz = lu || (id_valid && fp_pending);
      n_lu += lu;
      chk(load_use == lu, "load-use detect");
      chk(stall_pc == ((hz || x_stall) && !redirect) && stall_ifid == stall_pc, "front stall");
      chk(flush_ifid == redirect, "flush");
      chk(stall_idex == x_stall && bubble_exmem == x_stall, "coprocessor freeze");
      chk(bubble_idex == (!x_stall && (redirect || hz)), "EX bubble");
    end
    chk(n_lu > 50, "load-use cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
