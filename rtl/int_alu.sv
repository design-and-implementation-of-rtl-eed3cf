// int_alu: integer execution unit of the EX stage.
//
// Computes the RV32I arithmetic, logic, shift and set-less-than operations
// selected by a 4-bit operation code, and, beside it, the branch condition of
// the BEQ/BNE/BLT/BGE/BLTU/BGEU instruction given by funct3 on the same two
// operands. Purely combinational.
module int_alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  input  logic [2:0]  funct3,
  output logic [31:0] result,
  output logic        branch_taken
);
  always_comb begin
    unique case (op)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_SLL:   result = a << b[4:0];
      ALU_SLT:   result = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'd0, a < b};
      ALU_XOR:   result = a ^ b;
      ALU_SRL:   result = a >> b[4:0];
      ALU_SRA:   result = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    result = a | b;
      ALU_AND:   result = a & b;
      ALU_PASSB: result = b;
      default:   result = a + b;
    endcase
  end

  always_comb begin
    unique case (funct3)
      3'b000:  branch_taken = (a == b);
      3'b001:  branch_taken = (a != b);
      3'b100:  branch_taken = $signed(a) <  $signed(b);
      3'b101:  branch_taken = $signed(a) >= $signed(b);
      3'b110:  branch_taken = a <  b;
      3'b111:  branch_taken = a >= b;
      default: branch_taken = 1'b0;
    endcase
  end
endmodule
