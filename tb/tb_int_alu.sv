// tb_int_alu: every ALU operation and branch condition on random and corner
// operands, compared with expressions written independently here.
module tb_int_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic [2:0]  funct3;
  logic        taken;
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
  int_alu dut (.a, .b, .op, .funct3, .result, .branch_taken(taken));
  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    case (o)
      ALU_ADD:  return 32'(longint'(x) + longint'(y));
      ALU_SUB:  return 32'(longint'(x) - longint'(y));
      ALU_SLL:  return 32'(64'(x) << y[4:0]);
      ALU_SLT:  return (sx < sy) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(y)) ? 1 : 0;
      ALU_XOR:  return x ^ y;
      ALU_SRL:  return 32'(64'(x) >> y[4:0]);
      ALU_SRA:  return 32'(sx >>> y[4:0]);
      ALU_OR:   return x | y;
      ALU_AND:  return x & y;
      ALU_PASSB: return y;
      default:  return 0;
    endcase
  endfunction
  function automatic logic bmodel(input logic [2:0] f, input logic [31:0] x, input logic [31:0] y);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    case (f)
      0: return x == y;
      1: return x != y;
      4: return sx < sy;
      5: return sx >= sy;
      6: return longint'(x) < longint'(y);
      7: return longint'(x) >= longint'(y);
      default: return 0;
    endcase
  endfunction
  initial begin
    logic [31:0] corner [6] = '{0, 1, 32'hFFFFFFFF, 32'h80000000, 32'h7FFFFFFF, 31};
    for (int i = 0; i < 5000; i++) begin
      a = ($urandom_range(3) == 0) ? corner[$urandom_range(5)] : $urandom;
      b = ($urandom_range(3) == 0) ? corner[$urandom_range(5)] : $urandom;
      if ($urandom_range(7) == 0) b = a;
      op = alu_op_e'($urandom_range(10));
      funct3 = 3'($urandom);
      #1;
      chk(result == model(op, a, b), $sformatf("op %0d %h %h -> %h", op, a, b, result));
      chk(taken == bmodel(funct3, a, b), "branch condition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
