// rv_asm_pkg: instruction encoders and a small instruction-set simulator for
// the test benches of the decoder and of the whole processor.
//
// The encoders build RV32I and the supported F-extension words (FLW, FSW,
// FADD.S, FSUB.S, FMUL.S, FDIV.S) from register numbers and immediates. The
// simulator executes a program sequentially, one instruction at a time, on
// its own register files and byte memory, using fp_ref_pkg for the FP
// arithmetic; it stops at a `jal x0, 0` self-loop. Its final memory and
// flags are the expected state of the pipelined design.
package rv_asm_pkg;
  import fp_ref_pkg::*;

  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] opc);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1,
                                      input logic [2:0] f3, input logic [6:0] opc);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), f3, m[4:0], opc};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), f3, m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_t(input int off, input int rd);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] LUI(input int rd, input int imm20);  return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] ADDI(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] OPI(input int f3, input int rd, input int rs1, input int imm); return i_t(imm, rs1, 3'(f3), rd, 7'b0010011); endfunction
  function automatic logic [31:0] OP(input int f7, input int f3, input int rd, input int rs1, input int rs2);
    return r_t(7'(f7), rs2, rs1, 3'(f3), rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] ADD(input int rd, input int rs1, input int rs2); return OP(0, 0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SUB(input int rd, input int rs1, input int rs2); return OP(32, 0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] LOAD(input int f3, input int rd, input int rs1, input int imm); return i_t(imm, rs1, 3'(f3), rd, 7'b0000011); endfunction
  function automatic logic [31:0] STORE(input int f3, input int rs2, input int rs1, input int imm); return s_t(imm, rs2, rs1, 3'(f3), 7'b0100011); endfunction
  function automatic logic [31:0] LW(input int rd, input int rs1, input int imm); return LOAD(2, rd, rs1, imm); endfunction
  function automatic logic [31:0] SW(input int rs2, input int rs1, input int imm); return STORE(2, rs2, rs1, imm); endfunction
  function automatic logic [31:0] BR(input int f3, input int rs1, input int rs2, input int off); return b_t(off, rs2, rs1, 3'(f3)); endfunction
  function automatic logic [31:0] JAL(input int rd, input int off); return j_t(off, rd); endfunction
  function automatic logic [31:0] JALR(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] FLW(input int fd, input int rs1, input int imm); return i_t(imm, rs1, 3'b010, fd, 7'b0000111); endfunction
  function automatic logic [31:0] FSW(input int fs2, input int rs1, input int imm); return s_t(imm, fs2, rs1, 3'b010, 7'b0100111); endfunction
  // op: 0 FADD.S, 1 FSUB.S, 2 FMUL.S, 3 FDIV.S (rounding mode field = dynamic)
  function automatic logic [31:0] FOP(input int op, input int fd, input int fs1, input int fs2);
    return r_t(7'(op << 2), fs2, fs1, 3'b111, fd, 7'b1010011);
  endfunction

  // ------------------------------------------------------------- simulator
  class iss;
    logic [31:0] x [32];
    logic [31:0] f [32];
    logic [7:0]  mem [];
    bit          wrote [];   // word was stored to at least once
    logic [4:0]  fflags;
    int          steps;

    function new(int bytes);
      mem = new[bytes];
      wrote = new[bytes / 4];
      foreach (mem[i]) mem[i] = 0;
      foreach (wrote[i]) wrote[i] = 0;
      foreach (x[i]) x[i] = 0;
      foreach (f[i]) f[i] = 0;
      fflags = 0;
      steps = 0;
    endfunction

    function logic [31:0] rd32(input logic [31:0] a);
      int b;
      b = int'(a) % mem.size();
      return {mem[b+3], mem[b+2], mem[b+1], mem[b]};
    endfunction

    // Runs the program until the jal x0,0 self-loop; returns 0 if it never halts.
    function bit run(input logic [31:0] prog [], input int max_steps);
      logic [31:0] pc, in, imm_i, imm_s, imm_b, imm_j, a, b, res, ea, w;
      logic [6:0]  opc;
      logic [2:0]  f3;
      logic [4:0]  rd, rs1, rs2, fl;
      pc = 0;
      while (steps < max_steps) begin
        in = prog[pc >> 2];
        steps++;
        opc = in[6:0]; f3 = in[14:12]; rd = in[11:7]; rs1 = in[19:15]; rs2 = in[24:20];
        imm_i = {{20{in[31]}}, in[31:20]};
        imm_s = {{20{in[31]}}, in[31:25], in[11:7]};
        imm_b = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
        imm_j = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
        a = x[rs1]; b = x[rs2];
        case (opc)
          7'b0110111: begin if (rd != 0) x[rd] = {in[31:12], 12'd0}; pc += 4; end
          7'b0010111: begin if (rd != 0) x[rd] = pc + {in[31:12], 12'd0}; pc += 4; end
          7'b1101111: begin
            if (imm_j == 0) return 1;
            if (rd != 0) x[rd] = pc + 4; pc += imm_j;
          end
          7'b1100111: begin
            res = (a + imm_i) & ~32'd1;
            if (rd != 0) x[rd] = pc + 4; pc = res;
          end
          7'b1100011: begin
            bit t;
            case (f3)
              0: t = a == b;  1: t = a != b;
              4: t = $signed(a) < $signed(b);  5: t = $signed(a) >= $signed(b);
              6: t = a < b;   7: t = a >= b;
              default: t = 0;
            endcase
            pc = t ? pc + imm_b : pc + 4;
          end
          7'b0000011, 7'b0000111: begin
            ea = a + imm_i;
            w = rd32(ea & ~32'd3);
            case (f3)
              0: res = {{24{w[8*ea[1:0]+7]}}, w[8*ea[1:0] +: 8]};
              1: res = {{16{w[16*ea[1]+15]}}, w[16*ea[1] +: 16]};
              4: res = {24'd0, w[8*ea[1:0] +: 8]};
              5: res = {16'd0, w[16*ea[1] +: 16]};
              default: res = w;
            endcase
            if (opc == 7'b0000111) f[rd] = res;
            else if (rd != 0) x[rd] = res;
            pc += 4;
          end
          7'b0100011, 7'b0100111: begin
            int base;
            ea = a + imm_s;
            base = int'(ea) % mem.size();
            w = (opc == 7'b0100111) ? f[rs2] : b;
            wrote[base / 4] = 1;
            case (f3[1:0])
              0: mem[base] = w[7:0];
              1: begin mem[base] = w[7:0]; mem[base+1] = w[15:8]; end
              default: for (int k = 0; k < 4; k++) mem[base + k] = w[8*k +: 8];
            endcase
            pc += 4;
          end
          7'b0010011, 7'b0110011: begin
            logic [31:0] o2;
            logic alt;
            o2  = (opc == 7'b0010011) ? imm_i : b;
            alt = in[30] && (opc == 7'b0110011 || f3 == 3'b101);
            case (f3)
              0: res = alt ? a - o2 : a + o2;
              1: res = a << o2[4:0];
              2: res = ($signed(a) < $signed(o2)) ? 1 : 0;
              3: res = (a < o2) ? 1 : 0;
              4: res = a ^ o2;
              5: res = alt ? $unsigned($signed(a) >>> o2[4:0]) : a >> o2[4:0];
              6: res = a | o2;
              default: res = a & o2;
            endcase
            if (rd != 0) x[rd] = res;
            pc += 4;
          end
          7'b1010011: begin
            int op;
            op = int'(in[31:27]);
            if (in[26:25] == 0 && op <= 3) begin
              ref_op(op, f[rs1], f[rs2], res, fl);
              f[rd] = res;
              fflags |= fl;
            end
            pc += 4;
          end
          default: pc += 4;
        endcase
      end
      return 0;
    endfunction
  endclass

endpackage
