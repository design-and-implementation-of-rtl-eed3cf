// tb_forwarding_unit: exhaustive over small register indices and write
// enables: EX/MEM wins over MEM/WB, x0 is never forwarded.
module tb_forwarding_unit;
  logic [4:0] idex_rs1, idex_rs2, exmem_rd, memwb_rd;
  logic       exmem_we, memwb_we;
  logic [1:0] fwd_a, fwd_b;
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
  forwarding_unit dut (.idex_rs1, .idex_rs2, .exmem_rd, .exmem_we, .memwb_rd, .memwb_we, .fwd_a, .fwd_b);
  function automatic logic [1:0] m(input logic [4:0] rs);
    if (rs == 0) return 2'b00;
    if (exmem_we && exmem_rd == rs) return 2'b10;
    if (memwb_we && memwb_rd == rs) return 2'b01;
    return 2'b00;
  endfunction
  initial begin
    for (int r1 = 0; r1 < 4; r1++)
      for (int r2 = 0; r2 < 4; r2++)
        for (int e = 0; e < 4; e++)
          for (int w = 0; w < 4; w++)
            for (int en = 0; en < 4; en++) begin
              idex_rs1 = 5'(r1); idex_rs2 = 5'(r2 * 9 % 32); exmem_rd = 5'(e); memwb_rd = 5'(w);
              exmem_we = en[0]; memwb_we = en[1];
              #1;
              chk(fwd_a == m(idex_rs1) && fwd_b == m(idex_rs2), "forward select");
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
