// tb_control_unit: decodes one instruction of every class with random
// register fields and immediates and checks the route (integer pipeline or
// coprocessor), register usage, memory access, write-back source, ALU
// operation and the reassembled immediate; unsupported OP-FP encodings and
// unknown opcodes must decode as harmless no-ops.
module tb_control_unit;
  import riscv_pkg::*;
  import fpu_pkg::*;
  import fp_ref_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t       c;
  int          checks = 0, failures = 0;

  control_unit dut (.instr, .ctrl(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s: instr %h", what, instr);
    end
  endtask

  function automatic logic no_side_effects(input ctrl_t k);
    return !k.reg_write && !k.fp_reg_write && !k.mem_write && !k.mem_read && !k.is_fp &&
           !k.branch && !k.jal && !k.jalr;
  endfunction

  initial begin
    int rd, rs1, rs2, imm, op;
    for (int i = 0; i < 400; i++) begin
      rd = int'($urandom_range(31)); rs1 = int'($urandom_range(31)); rs2 = int'($urandom_range(31));
      imm = int'($urandom_range(4095)) - 2048;

      instr = ADDI(rd, rs1, imm); #1;
      chk(c.valid_op && c.reg_write && c.alu_src_imm && c.alu_op == ALU_ADD && c.uses_rs1 &&
          !c.is_fp && c.rd == 5'(rd) && c.rs1 == 5'(rs1) && c.imm == 32'(imm), "OP-IMM addi");
      instr = OPI(5, rd, rs1, 1024 + (imm & 31)); #1;
      chk(c.alu_op == ALU_SRA, "srai");
      instr = SUB(rd, rs1, rs2); #1;
      chk(c.reg_write && !c.alu_src_imm && c.alu_op == ALU_SUB && c.uses_rs1 && c.uses_rs2 && !c.is_fp, "OP sub");
      instr = OP(0, 7, rd, rs1, rs2); #1;
      chk(c.alu_op == ALU_AND, "and");
      instr = LW(rd, rs1, imm); #1;
      chk(c.reg_write && c.mem_read && c.wb_sel == WB_MEM && c.imm == 32'(imm) && !c.fp_reg_write, "lw");
      instr = SW(rs2, rs1, imm); #1;
      chk(c.mem_write && !c.reg_write && c.uses_rs2 && !c.fp_store && c.imm == 32'(imm), "sw");
      instr = BR(1, rs1, rs2, (imm & ~1) * 2); #1;
      chk(c.branch && !c.reg_write && c.funct3 == 3'd1 && c.imm == 32'((imm & ~1) * 2), "bne");
      instr = JAL(rd, (imm & ~1) * 256); #1;
      chk(c.jal && c.reg_write && c.wb_sel == WB_PC4 && c.imm == 32'((imm & ~1) * 256), "jal");
      instr = JALR(rd, rs1, imm); #1;
      chk(c.jalr && c.uses_rs1 && c.wb_sel == WB_PC4 && c.imm == 32'(imm), "jalr");
      instr = LUI(rd, imm & 20'hFFFFF); #1;
      chk(c.reg_write && c.alu_op == ALU_PASSB && c.imm == {20'(imm), 12'd0}, "lui");
      instr = AUIPC(rd, imm & 20'hFFFFF); #1;
      chk(c.reg_write && c.alu_a_pc && c.alu_op == ALU_ADD, "auipc");

      op = int'($urandom_range(3));
      instr = FOP(op, rd, rs1, rs2); #1;
      chk(c.valid_op && c.is_fp && c.fp_op == 3'(op) && c.uses_frs1 && c.uses_frs2 &&
          !c.uses_rs1 && !c.reg_write && !c.fp_reg_write && !c.mem_write, "OP-FP dispatch");
      instr = FLW(rd, rs1, imm); #1;
      chk(c.fp_reg_write && c.mem_read && !c.reg_write && !c.is_fp && c.uses_rs1 && c.imm == 32'(imm), "flw");
      instr = FSW(rs2, rs1, imm); #1;
      chk(c.mem_write && c.fp_store && c.uses_frs2 && !c.uses_rs2 && !c.is_fp, "fsw");

      instr = r_t(7'b0101100, 0, rs1, 3'b000, rd, 7'b1010011); #1;   // FSQRT.S: not supported
      chk(!c.valid_op && no_side_effects(c), "unsupported OP-FP is a no-op");
      instr = {25'($urandom), 7'b1110011}; #1;                        // SYSTEM
      chk(no_side_effects(c), "SYSTEM is a no-op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
