// riscv_pkg: opcodes, ALU operation codes and the decoded-control record
// shared by the integer pipeline of the RV32I core.
//
// The five major opcodes that steer an instruction either down the integer
// pipeline or to the floating-point coprocessor (OP, OP-IMM, OP-FP, LOAD-FP,
// STORE-FP) are the ones the design is organised around; the remaining
// opcodes are the standard RV32I encodings. The 4-bit ALU operation code
// width matches the core's ALU interface; the individual code values are
// this design's own choice.
package riscv_pkg;

  localparam logic [6:0] OPC_LUI      = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC    = 7'b0010111;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH   = 7'b1100011;
  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_OP_IMM   = 7'b0010011;
  localparam logic [6:0] OPC_OP       = 7'b0110011;
  localparam logic [6:0] OPC_OP_FP    = 7'b1010011;
  localparam logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  localparam logic [6:0] OPC_STORE_FP = 7'b0100111;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9,
    ALU_PASSB = 4'd10
  } alu_op_e;

  // Write-back source
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  typedef struct packed {
    logic        valid_op;     // a recognised instruction (others are no-ops)
    logic        reg_write;    // writes integer rd
    logic        fp_reg_write; // FLW: writes FP rd from memory
    logic        mem_read;     // integer or FP load
    logic        mem_write;    // integer or FP store
    logic        fp_store;     // FSW: store data comes from FP rs2
    logic        uses_rs1;
    logic        uses_rs2;
    logic        uses_frs1;
    logic        uses_frs2;
    logic        alu_src_imm;  // ALU B = immediate
    logic        alu_a_pc;     // ALU A = PC (AUIPC)
    logic        branch;
    logic        jal;
    logic        jalr;
    logic        is_fp;        // dispatched to the coprocessor
    logic [2:0]  fp_op;        // coprocessor operation (fpu_pkg::fp_op_e)
    alu_op_e     alu_op;
    wb_sel_e     wb_sel;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
  } ctrl_t;

endpackage
