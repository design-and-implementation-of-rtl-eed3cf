// riscv_core_with_ext_fpu: five-stage RV32I pipeline with a decoupled,
// clock-gated single-precision floating-point coprocessor.
//
// Pipeline: IF (PC, instruction memory) -> ID (decode, integer and FP
// register files, hazard detection) -> EX (integer ALU with forwarding,
// branch/jump resolution, coprocessor request) -> MEM (data memory) -> WB.
// The decoder routes OP/OP-IMM and the other integer classes down the
// integer pipeline and OP-FP arithmetic (FADD.S, FSUB.S, FMUL.S, FDIV.S) to
// the coprocessor: in EX the instruction's two FP operands, operation and
// destination register are offered on the request channel
// (x_issue_valid / x_issue_ready). Once accepted the instruction leaves the
// pipeline; the coprocessor computes on its own and returns {data, rd,
// flags} on the response channel (x_result_valid / x_result_ready), which
// writes the FP register file directly and ORs the flags into fflags.
// FLW/FSW move data between memory and the FP register file through the
// ordinary load/store path.
//
// Hazards: integer RAW hazards are bypassed from EX/MEM and MEM/WB; a
// load-use hazard costs one bubble. FP registers are tracked by a busy
// scoreboard (fpu_intf): decode stalls while an FP source or destination
// is still pending, so independent integer work continues while the
// coprocessor runs. A request the coprocessor cannot take yet freezes
// IF..EX. A taken branch/jump, resolved in EX, flushes two instructions.
// While an FLW writes back, the coprocessor response is held off
// (x_result_ready low) so the FP register file needs one write port.
//
// Memories, reset style (synchronous active-low in the core, asynchronous in
// the gated coprocessor), branch resolution in EX and the scoreboard are this
// design's choices. prog_* loads the instruction memory; dbg_* reads data
// memory; the remaining outputs are observation points. No CSR instructions
// are implemented: the accumulated fflags are an output port.
module riscv_core_with_ext_fpu
  import riscv_pkg::*;
  import fpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data,
  output logic [4:0]  fflags,
  output logic [31:0] pc_out,
  output logic [31:0] wb_data_out,
  output logic [4:0]  wb_rd_out,
  output logic        wb_reg_write_out,
  output logic        fpu_gated_clk,
  output logic        fpu_busy
);
  // ---------------------------------------------------------------- IF
  logic        stall_pc, stall_ifid, flush_ifid, stall_idex, bubble_idex, bubble_exmem;
  logic        load_use, redirect;
  logic [31:0] redirect_target, pc, if_instr;

  if_stage u_if (.clk, .rst_n, .stall(stall_pc), .redirect, .target(redirect_target), .pc);
  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data), .raddr(pc), .rdata(if_instr));

  logic        ifid_valid;
  logic [31:0] ifid_pc, ifid_instr;

  always_ff @(posedge clk)
    if (!rst_n || flush_ifid) begin
      ifid_valid <= 1'b0;
      ifid_pc    <= '0;
      ifid_instr <= 32'h0000_0013;
    end else if (!stall_ifid) begin
      ifid_valid <= 1'b1;
      ifid_pc    <= pc;
      ifid_instr <= if_instr;
    end

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [31:0] id_rs1_val, id_rs2_val, id_frs1_val, id_frs2_val;
  logic [31:0] fp_busy;
  logic        id_writes_fp, fp_pending;

  // write-back signals (declared early, driven in WB)
  logic        wb_int_we, wb_fp_we, fp_wr_en;
  logic [4:0]  fp_wr_addr;
  logic [31:0] wb_data, fp_wr_data;

  control_unit u_dec (.instr(ifid_instr), .ctrl(id_ctrl));

  int_regfile u_irf (
    .clk, .ra1(id_ctrl.rs1), .ra2(id_ctrl.rs2), .rd1(id_rs1_val), .rd2(id_rs2_val),
    .we(wb_int_we), .wa(wb_rd_out), .wd(wb_data));

  fp_regfile u_frf (
    .clk, .ra1(id_ctrl.rs1), .ra2(id_ctrl.rs2), .rd1(id_frs1_val), .rd2(id_frs2_val),
    .we(fp_wr_en), .wa(fp_wr_addr), .wd(fp_wr_data));

  assign id_writes_fp = id_ctrl.is_fp || id_ctrl.fp_reg_write;
  assign fp_pending   = (id_ctrl.uses_frs1 && fp_busy[id_ctrl.rs1]) ||
                        (id_ctrl.uses_frs2 && fp_busy[id_ctrl.rs2]) ||
                        (id_writes_fp      && fp_busy[id_ctrl.rd]);

  // ---------------------------------------------------------------- ID/EX
  logic        idex_valid;
  ctrl_t       idex_ctrl;
  logic [31:0] idex_pc, idex_rs1_val, idex_rs2_val, idex_frs1_val, idex_frs2_val;

  always_ff @(posedge clk)
    if (!rst_n || (bubble_idex && !stall_idex)) begin
      idex_valid <= 1'b0;
      idex_ctrl  <= '0;
      idex_pc    <= '0;
      idex_rs1_val <= '0; idex_rs2_val <= '0; idex_frs1_val <= '0; idex_frs2_val <= '0;
    end else if (!stall_idex) begin
      idex_valid    <= ifid_valid && id_ctrl.valid_op;
      idex_ctrl     <= id_ctrl;
      idex_pc       <= ifid_pc;
      idex_rs1_val  <= id_rs1_val;
      idex_rs2_val  <= id_rs2_val;
      idex_frs1_val <= id_frs1_val;
      idex_frs2_val <= id_frs2_val;
    end

  // ---------------------------------------------------------------- EX
  logic [1:0]  fwd_a, fwd_b;
  logic [31:0] ex_rs1, ex_rs2, alu_a, alu_b, alu_result, ex_result;
  logic        alu_branch;   // branch condition on the forwarded rs1/rs2 (B = rs2 for branches)

  // EX/MEM (declared here for forwarding)
  logic        exmem_valid, exmem_reg_write, exmem_fp_reg_write, exmem_mem_read, exmem_mem_write;
  logic [2:0]  exmem_funct3;
  logic [4:0]  exmem_rd_addr;
  logic [31:0] exmem_alu_result, exmem_store_data;

  // MEM/WB
  logic        memwb_valid, memwb_reg_write, memwb_fp_reg_write;
  logic [4:0]  memwb_rd;
  logic [31:0] memwb_data;

  forwarding_unit u_fwd (
    .idex_rs1(idex_ctrl.rs1), .idex_rs2(idex_ctrl.rs2),
    .exmem_rd(exmem_rd_addr), .exmem_we(exmem_valid && exmem_reg_write),
    .memwb_rd(memwb_rd), .memwb_we(memwb_valid && memwb_reg_write),
    .fwd_a, .fwd_b);

  always_comb begin
    unique case (fwd_a)
      2'b10:   ex_rs1 = exmem_alu_result;
      2'b01:   ex_rs1 = memwb_data;
      default: ex_rs1 = idex_rs1_val;
    endcase
    unique case (fwd_b)
      2'b10:   ex_rs2 = exmem_alu_result;
      2'b01:   ex_rs2 = memwb_data;
      default: ex_rs2 = idex_rs2_val;
    endcase
    alu_a = idex_ctrl.alu_a_pc    ? idex_pc       : ex_rs1;
    alu_b = idex_ctrl.alu_src_imm ? idex_ctrl.imm : ex_rs2;
  end

  int_alu u_alu (.a(alu_a), .b(alu_b), .op(idex_ctrl.alu_op), .funct3(idex_ctrl.funct3),
                 .result(alu_result), .branch_taken(alu_branch));

  assign redirect = idex_valid &&
                    (idex_ctrl.jal || idex_ctrl.jalr || (idex_ctrl.branch && alu_branch));
  assign redirect_target = idex_ctrl.jalr ? ((ex_rs1 + idex_ctrl.imm) & ~32'd1)
                                          : (idex_pc + idex_ctrl.imm);
  assign ex_result = (idex_ctrl.wb_sel == WB_PC4) ? (idex_pc + 32'd4) : alu_result;

  // Coprocessor request
  logic   x_issue_valid, x_issue_ready, x_result_valid, x_result_ready, x_stall;
  x_req_t x_issue_req;
  x_rsp_t x_result;

  assign x_issue_valid   = idex_valid && idex_ctrl.is_fp;
  assign x_issue_req.op  = fp_op_e'(idex_ctrl.fp_op);
  assign x_issue_req.a   = idex_frs1_val;
  assign x_issue_req.b   = idex_frs2_val;
  assign x_issue_req.rd  = idex_ctrl.rd;
  assign x_stall         = x_issue_valid && !x_issue_ready;

  hazard_unit u_hz (
    .id_valid(ifid_valid), .id_uses_rs1(id_ctrl.uses_rs1), .id_uses_rs2(id_ctrl.uses_rs2),
    .id_rs1(id_ctrl.rs1), .id_rs2(id_ctrl.rs2),
    .idex_valid, .idex_mem_read(idex_ctrl.mem_read), .idex_reg_write(idex_ctrl.reg_write),
    .idex_rd(idex_ctrl.rd), .fp_pending, .x_stall, .redirect,
    .load_use, .stall_pc, .stall_ifid, .flush_ifid, .stall_idex, .bubble_idex, .bubble_exmem);

  // ---------------------------------------------------------------- EX/MEM
  always_ff @(posedge clk)
    if (!rst_n || bubble_exmem) begin
      exmem_valid <= 1'b0;
      exmem_reg_write <= 1'b0; exmem_fp_reg_write <= 1'b0;
      exmem_mem_read <= 1'b0;  exmem_mem_write <= 1'b0;
      exmem_funct3 <= '0; exmem_rd_addr <= '0;
      exmem_alu_result <= '0; exmem_store_data <= '0;
    end else begin
      exmem_valid        <= idex_valid && !idex_ctrl.is_fp;
      exmem_reg_write    <= idex_ctrl.reg_write;
      exmem_fp_reg_write <= idex_ctrl.fp_reg_write;
      exmem_mem_read     <= idex_ctrl.mem_read;
      exmem_mem_write    <= idex_ctrl.mem_write;
      exmem_funct3       <= idex_ctrl.funct3;
      exmem_rd_addr      <= idex_ctrl.rd;
      exmem_alu_result   <= ex_result;
      exmem_store_data   <= idex_ctrl.fp_store ? idex_frs2_val : ex_rs2;
    end

  // ---------------------------------------------------------------- MEM
  logic [3:0]  dm_be;
  logic [31:0] dm_wdata, dm_rdata, ld_data;
  logic [1:0]  boff;

  assign boff = exmem_alu_result[1:0];

  always_comb begin
    unique case (exmem_funct3[1:0])
      2'b00:   begin dm_be = 4'b0001 << boff;            dm_wdata = {4{exmem_store_data[7:0]}};  end
      2'b01:   begin dm_be = 4'b0011 << {boff[1], 1'b0}; dm_wdata = {2{exmem_store_data[15:0]}}; end
      default: begin dm_be = 4'b1111;                    dm_wdata = exmem_store_data;            end
    endcase
  end

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(exmem_valid && exmem_mem_write), .be(dm_be), .addr(exmem_alu_result),
    .wdata(dm_wdata), .rdata(dm_rdata), .dbg_addr, .dbg_rdata(dbg_data));

  always_comb begin
    logic [7:0]  b8;
    logic [15:0] h16;
    b8  = dm_rdata[8*boff +: 8];
    h16 = boff[1] ? dm_rdata[31:16] : dm_rdata[15:0];
    unique case (exmem_funct3)
      3'b000:  ld_data = {{24{b8[7]}}, b8};
      3'b001:  ld_data = {{16{h16[15]}}, h16};
      3'b100:  ld_data = {24'd0, b8};
      3'b101:  ld_data = {16'd0, h16};
      default: ld_data = dm_rdata;
    endcase
  end

  // ---------------------------------------------------------------- MEM/WB
  always_ff @(posedge clk)
    if (!rst_n) begin
      memwb_valid <= 1'b0; memwb_reg_write <= 1'b0; memwb_fp_reg_write <= 1'b0;
      memwb_rd <= '0; memwb_data <= '0;
    end else begin
      memwb_valid        <= exmem_valid;
      memwb_reg_write    <= exmem_reg_write;
      memwb_fp_reg_write <= exmem_fp_reg_write;
      memwb_rd           <= exmem_rd_addr;
      memwb_data         <= exmem_mem_read ? ld_data : exmem_alu_result;
    end

  // ---------------------------------------------------------------- WB
  assign wb_data   = memwb_data;
  assign wb_int_we = memwb_valid && memwb_reg_write;
  assign wb_fp_we  = memwb_valid && memwb_fp_reg_write;

  // Coprocessor response: taken whenever FLW is not using the FP write port.
  assign x_result_ready = !wb_fp_we;
  assign fp_wr_en   = wb_fp_we || x_result_valid;
  assign fp_wr_addr = wb_fp_we ? memwb_rd   : x_result.rd;
  assign fp_wr_data = wb_fp_we ? memwb_data : x_result.data;

  fpu_intf u_fpu_intf (
    .clk, .rst_n,
    .set_en(ifid_valid && id_writes_fp && !stall_ifid && !flush_ifid && !bubble_idex),
    .set_rd(id_ctrl.rd),
    .clr_a_en(wb_fp_we), .clr_a_rd(memwb_rd),
    .clr_b_en(x_result_valid && x_result_ready), .clr_b_rd(x_result.rd),
    .flags_in(x_result.flags), .busy(fp_busy), .fflags);

  // ---------------------------------------------------------------- coprocessor
  logic gclk_add, gclk_mul, gclk_div;

  ext_fpu EXT_FPU (
    .clk, .rst_n,
    .x_issue_valid, .x_issue_ready, .x_issue_req,
    .x_result_valid, .x_result_ready, .x_result,
    .gclk_ctrl(fpu_gated_clk), .gclk_add, .gclk_mul, .gclk_div);

  assign fpu_busy         = !x_issue_ready;
  assign pc_out           = pc;
  assign wb_data_out      = wb_data;
  assign wb_rd_out        = memwb_rd;
  assign wb_reg_write_out = wb_int_we;

  // Handshake rule: a request that is offered but not accepted stays offered
  // and does not change.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    x_issue_valid && !x_issue_ready |=> x_issue_valid && $stable(x_issue_req));
endmodule
