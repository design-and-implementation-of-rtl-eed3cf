// tb_riscv_core_with_ext_fpu: runs a whole program on the processor at its
// default sizes and compares the final data memory and exception flags with
// an instruction-set simulator (rv_asm_pkg) that executed the same program.
//
// Eight programs are generated and run in turn, each after a reset: a prologue that clears x1..x15 and
// f0..f15, a directed part (forwarding, load-use, a counted loop, JAL/JALR,
// FLW of FP constants, back-to-back FP operations, integer work overlapping
// a division, a dependent FP operation, overflow and divide-by-zero, an FLW
// burst that collides with a coprocessor response), a random part of integer
// ALU/load/store and FP operations with random dependencies, and an epilogue
// that stores x1..x15 and f1..f15 to memory before a jal x0,0 self-loop.
// Every pipeline and coprocessor mechanism is counted; one that never
// happens is a failure. Also checked: the coprocessor clock is gated off on
// most cycles, and integer instructions retire while the coprocessor works.
module tb_riscv_core_with_ext_fpu;
  import fp_ref_pkg::*;
  import rv_asm_pkg::*;

  localparam int IMEM_WORDS = 256;
  localparam int DMEM_BYTES = 1024;
  localparam int N_RANDOM   = 60;
  localparam int N_PROGRAMS = 8;    // independent random programs, each after a reset

  logic        clk = 0, rst_n = 1, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0, dbg_addr = 0, dbg_data;
  logic [4:0]  fflags, wb_rd_out;
  logic [31:0] pc_out, wb_data_out;
  logic        wb_reg_write_out, fpu_gated_clk, fpu_busy;
  int          checks = 0, failures = 0;

  riscv_core_with_ext_fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];

  function automatic void emit(input logic [31:0] w); prog.push_back(w); endfunction

  task automatic build();
    bit  stored [64];
    prog.delete();
    // prologue
    for (int i = 1; i < 16; i++) emit(ADDI(i, 0, 0));
    emit(SW(0, 0, 12'h3FC));
    for (int i = 0; i < 16; i++) emit(FLW(i, 0, 12'h3FC));
    // integer forwarding, load-use
    emit(ADDI(1, 0, 10));
    emit(ADDI(2, 0, 3));
    emit(ADD(3, 1, 2));                 // EX/MEM and MEM/WB forwarding
    emit(SUB(4, 1, 2));
    emit(SW(3, 0, 12'h100));
    emit(SW(4, 0, 12'h104));
    emit(LW(5, 0, 12'h100));
    emit(ADD(6, 5, 1));                 // load-use
    emit(SW(6, 0, 12'h108));
    // counted loop (taken branches flush)
    emit(ADDI(7, 0, 5));
    emit(ADDI(8, 0, 0));
    emit(ADDI(8, 8, 3));
    emit(ADDI(7, 7, -1));
    emit(BR(1, 7, 0, -8));
    emit(SW(8, 0, 12'h10C));
    // jumps
    emit(JAL(9, 12));
    emit(ADDI(8, 0, 99));
    emit(ADDI(8, 0, 98));
    emit(AUIPC(10, 0));
    emit(JALR(11, 10, 12));
    emit(ADDI(8, 8, 1000));
    emit(SW(9, 0, 12'h110));
    emit(SW(10, 0, 12'h114));
    emit(SW(11, 0, 12'h118));
    // FP constants 10.0, 3.0, 2^127
    emit(LUI(12, 20'h41200)); emit(SW(12, 0, 12'h000));
    emit(LUI(12, 20'h40400)); emit(SW(12, 0, 12'h004));
    emit(LUI(12, 20'h7F000)); emit(SW(12, 0, 12'h008));
    emit(FLW(1, 0, 12'h000));
    emit(FLW(2, 0, 12'h004));
    emit(FLW(3, 0, 12'h008));
    emit(FOP(0, 4, 1, 2));              // 10 + 3
    emit(FOP(1, 5, 1, 2));              // 10 - 3 (coprocessor busy: request waits)
    emit(FOP(2, 6, 1, 2));              // 10 * 3
    emit(FOP(3, 7, 1, 2));              // 10 / 3
    for (int i = 0; i < 8; i++) emit(ADDI(13, 13, i + 1));   // overlaps the division
    emit(FOP(0, 8, 7, 1));              // depends on the division
    emit(FOP(2, 9, 3, 3));              // overflow
    emit(FOP(3, 10, 1, 11));            // divide by zero (f11 = 0)
    emit(FOP(3, 12, 1, 2));             // division whose response meets an FLW burst
    for (int i = 0; i < 34; i++) emit(FLW((i % 4 == 3) ? 11 : 13 + (i % 4), 0, 4 * (i % 3)));
    // random part
    for (int i = 0; i < 64; i++) stored[i] = 0;
    for (int i = 0; i < N_RANDOM; i++) begin
      int k, rd, r1, r2, slot;
      k  = int'($urandom_range(9));
      rd = 1 + int'($urandom_range(7)); r1 = 1 + int'($urandom_range(7)); r2 = 1 + int'($urandom_range(7));
      case (k)
        0, 1: emit(ADDI(rd, r1, int'($urandom_range(4095)) - 2048));
        2:    emit(OPI(int'($urandom_range(1)) ? 1 : 5, rd, r1, int'($urandom_range(31)) + (int'($urandom_range(1)) * 1024)));
        3, 4: begin
          int f3, f7;
          f3 = int'($urandom_range(7));
          f7 = ((f3 == 0 || f3 == 5) && $urandom_range(1)) ? 32 : 0;
          emit(OP(f7, f3, rd, r1, r2));
        end
        5: begin
          slot = int'($urandom_range(63));
          emit(SW(r2, 0, 12'h200 + 4 * slot));
          stored[slot] = 1;
        end
        6: begin
          slot = int'($urandom_range(63));
          if (stored[slot]) emit(LOAD(int'($urandom_range(1)) ? 2 : 4, rd, 0, 12'h200 + 4 * slot + (int'($urandom_range(3)) & 0)));
          else emit(ADD(rd, r1, r2));
        end
        default: emit(FOP(int'($urandom_range(3)), 1 + int'($urandom_range(9)),
                          1 + int'($urandom_range(9)), 1 + int'($urandom_range(9))));
      endcase
    end
    // epilogue
    for (int i = 1; i < 16; i++) emit(SW(i, 0, 12'h300 + 4 * i));
    for (int i = 1; i < 16; i++) emit(FSW(i, 0, 12'h380 + 4 * i));
    emit(JAL(0, 0));
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_fwd_exmem, n_fwd_memwb, n_load_use, n_fp_stall, n_x_stall, n_flush,
      n_backpressure, n_overlap, n_gclk, n_clk, n_fp_issue, n_flw, n_fsw;

  always @(posedge clk) if (rst_n) begin
    n_clk++;
    if (dut.idex_valid && (dut.fwd_a == 2'b10 || dut.fwd_b == 2'b10)) n_fwd_exmem++;
    if (dut.idex_valid && (dut.fwd_a == 2'b01 || dut.fwd_b == 2'b01)) n_fwd_memwb++;
    if (dut.load_use) n_load_use++;
    if (dut.ifid_valid && dut.fp_pending && !dut.redirect) n_fp_stall++;
    if (dut.x_stall) n_x_stall++;
    if (dut.redirect) n_flush++;
    if (dut.x_result_valid && !dut.x_result_ready) n_backpressure++;
    if (dut.wb_int_we && fpu_busy) n_overlap++;
    if (dut.x_issue_valid && dut.x_issue_ready) n_fp_issue++;
    if (dut.wb_fp_we) n_flw++;
    if (dut.exmem_valid && dut.exmem_mem_write) n_fsw++;
  end
  always @(posedge fpu_gated_clk) n_gclk++;

  initial begin
    iss          m;
    logic [31:0] img [];
    int          halt_pc, stable, cycles;
   for (int run = 0; run < N_PROGRAMS; run++) begin
    build();
    chk(prog.size() <= IMEM_WORDS, $sformatf("program of %0d words fits", prog.size()));
    img = new[prog.size()];
    foreach (prog[i]) img[i] = prog[i];
    m = new(DMEM_BYTES);
    chk(m.run(img, 100000), "reference simulator halts");
    halt_pc = 4 * (prog.size() - 1);

    // load the program while the core is held in reset (a falling edge of
    // rst_n resets the asynchronously reset coprocessor)
    #1 rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(4 * i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    stable = 0; cycles = 0;
    while (stable < 60 && cycles < 30000) begin
      @(posedge clk); cycles++;
      stable = (pc_out >= 32'(halt_pc) && pc_out <= 32'(halt_pc + 8)) ? stable + 1 : 0;
    end
    chk(stable >= 60, "reached the final self-loop");
    $display("program: %0d instructions, %0d executed by the reference, %0d cycles",
             prog.size(), m.steps, cycles);

    // data memory against the reference
    for (int w = 0; w < DMEM_BYTES / 4; w++) if (m.wrote[w]) begin
      dbg_addr = 32'(4 * w); #1;
      chk(dbg_data == m.rd32(32'(4 * w)),
          $sformatf("mem[%h] = %h, expected %h", 4 * w, dbg_data, m.rd32(32'(4 * w))));
    end
    chk(fflags == m.fflags, $sformatf("fflags %b expected %b", fflags, m.fflags));
    chk(fflags[3] && fflags[2] && fflags[0], "DZ, OF and NX raised");
    @(negedge clk);
    rst_n = 0;
   end

    $display("mechanisms: fwd EX/MEM %0d, fwd MEM/WB %0d, load-use %0d, FP scoreboard stall %0d, request stall %0d, flush %0d, response back-pressure %0d, integer retire during FP %0d, FP issues %0d, FLW writes %0d, stores %0d",
             n_fwd_exmem, n_fwd_memwb, n_load_use, n_fp_stall, n_x_stall, n_flush,
             n_backpressure, n_overlap, n_fp_issue, n_flw, n_fsw);
    $display("clock gating: control clock %0d edges of %0d", n_gclk, n_clk);
    chk(n_fwd_exmem > 0, "EX/MEM forwarding happened");
    chk(n_fwd_memwb > 0, "MEM/WB forwarding happened");
    chk(n_load_use > 0, "load-use stall happened");
    chk(n_fp_stall > 0, "FP scoreboard stall happened");
    chk(n_x_stall > 0, "coprocessor request stall happened");
    chk(n_flush > 0, "branch/jump flush happened");
    chk(n_backpressure > 0, "response back-pressure happened");
    chk(n_overlap > 0, "integer instructions retired while the coprocessor worked");
    chk(n_fp_issue > 0 && n_flw > 0 && n_fsw > 0, "FP issue, FLW and stores happened");
    chk(n_gclk > 0 && n_gclk < n_clk / 2, "coprocessor clock gated off most of the time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
