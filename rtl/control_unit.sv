// control_unit: instruction decoder of the ID stage.
//
// Turns one 32-bit instruction into the ctrl_t record that travels down the
// pipeline. The opcode decides the route: OP and OP-IMM (and the other RV32I
// classes) stay in the integer pipeline, OP-FP instructions FADD.S, FSUB.S,
// FMUL.S and FDIV.S are marked for dispatch to the floating-point
// coprocessor, and LOAD-FP/STORE-FP (FLW/FSW) use the core's own load/store
// path with the FP register file as destination or data source.
// The rounding-mode field of OP-FP is not decoded (the coprocessor always
// rounds to nearest even). FENCE, SYSTEM and every unrecognised encoding
// decode as a no-op with no side effects. Purely combinational.
module control_unit
  import riscv_pkg::*;
  import fpu_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];
  assign f7     = instr[31:25];
  assign imm_i  = {{20{instr[31]}}, instr[31:20]};
  assign imm_s  = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b  = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u  = {instr[31:12], 12'd0};
  assign imm_j  = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.wb_sel = WB_ALU;
    ctrl.funct3 = f3;
    ctrl.rd     = instr[11:7];
    ctrl.rs1    = instr[19:15];
    ctrl.rs2    = instr[24:20];
    ctrl.fp_op  = FP_ADD;

    unique case (opcode)
      OPC_LUI: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op = ALU_PASSB; ctrl.imm = imm_u;
      end
      OPC_AUIPC: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.alu_src_imm = 1'b1;
        ctrl.alu_a_pc = 1'b1; ctrl.imm = imm_u;
      end
      OPC_JAL: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.jal = 1'b1;
        ctrl.wb_sel = WB_PC4; ctrl.imm = imm_j;
      end
      OPC_JALR: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.jalr = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.imm = imm_i;
      end
      OPC_BRANCH: begin
        ctrl.valid_op = 1'b1; ctrl.branch = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1; ctrl.imm = imm_b;
      end
      OPC_LOAD: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.alu_src_imm = 1'b1; ctrl.wb_sel = WB_MEM;
        ctrl.imm = imm_i;
      end
      OPC_STORE: begin
        ctrl.valid_op = 1'b1; ctrl.mem_write = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.uses_rs2 = 1'b1; ctrl.alu_src_imm = 1'b1; ctrl.imm = imm_s;
      end
      OPC_OP_IMM: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.imm = imm_i;
        unique case (f3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b001: ctrl.alu_op = ALU_SLL;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b101: ctrl.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_AND;
        endcase
      end
      OPC_OP: begin
        ctrl.valid_op = 1'b1; ctrl.reg_write = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        unique case (f3)
          3'b000: ctrl.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
          3'b001: ctrl.alu_op = ALU_SLL;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b101: ctrl.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_AND;
        endcase
      end
      OPC_OP_FP: begin
        unique case (f7)
          7'b0000000: begin ctrl.valid_op = 1'b1; ctrl.fp_op = FP_ADD; end
          7'b0000100: begin ctrl.valid_op = 1'b1; ctrl.fp_op = FP_SUB; end
          7'b0001000: begin ctrl.valid_op = 1'b1; ctrl.fp_op = FP_MUL; end
          7'b0001100: begin ctrl.valid_op = 1'b1; ctrl.fp_op = FP_DIV; end
          default:    ctrl.valid_op = 1'b0;
        endcase
        ctrl.is_fp     = ctrl.valid_op;
        ctrl.uses_frs1 = ctrl.valid_op;
        ctrl.uses_frs2 = ctrl.valid_op;
      end
      OPC_LOAD_FP: if (f3 == 3'b010) begin
        ctrl.valid_op = 1'b1; ctrl.fp_reg_write = 1'b1; ctrl.mem_read = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.alu_src_imm = 1'b1; ctrl.wb_sel = WB_MEM;
        ctrl.imm = imm_i;
      end
      OPC_STORE_FP: if (f3 == 3'b010) begin
        ctrl.valid_op = 1'b1; ctrl.mem_write = 1'b1; ctrl.fp_store = 1'b1;
        ctrl.uses_rs1 = 1'b1; ctrl.uses_frs2 = 1'b1; ctrl.alu_src_imm = 1'b1;
        ctrl.imm = imm_s;
      end
      default: ;
    endcase
  end
endmodule
