// tb_int_fp_demo: a short demonstration program on the processor at its
// default sizes, in the style of a bring-up test: two integer operands, 10 and
// 3, go through the integer ALU (ADD, SUB, AND, OR), and the same two values
// as single-precision numbers go through the coprocessor (FADD, FSUB, FMUL,
// FDIV), whose results are stored to data memory with FSW.
//
// Checked against values worked out by hand:
//  - the order and values of the integer register writes seen on the
//    write-back outputs, and that the six ALU results retire on consecutive
//    cycles (every dependency is covered by forwarding, no bubble);
//  - the four stored FP results and the sticky flags (only inexact, from
//    10/3);
//  - for each coprocessor request, the cycles from its acceptance to
//    x_result_valid (1 for add, sub and multiply, 29 for the divide), and the
//    number of rising edges on the gated control clock (2 + latency each,
//    none while the coprocessor is idle).
module tb_int_fp_demo;
  import rv_asm_pkg::*;

  logic        clk = 0, rst_n = 1, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0, dbg_addr = 0, dbg_data;
  logic [4:0]  fflags, wb_rd_out;
  logic [31:0] pc_out, wb_data_out;
  logic        wb_reg_write_out, fpu_gated_clk, fpu_busy;
  int          checks = 0, failures = 0;

  riscv_core_with_ext_fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] prog [$];

  // ------------------------------------------------------------ monitors
  int          wb_cycle [$], n_cyc;
  logic [4:0]  wb_rd [$];
  logic [31:0] wb_val [$];
  int          lat [$], n_gclk, accepted_at, waiting;

  always @(posedge clk) if (rst_n) begin
    n_cyc++;
    if (wb_reg_write_out && wb_rd_out != 0) begin
      wb_rd.push_back(wb_rd_out); wb_val.push_back(wb_data_out); wb_cycle.push_back(n_cyc);
    end
    // values sampled at the edge: a response raised by the edge after the
    // accepting one is first seen one edge later
    if (dut.x_result_valid && waiting) begin
      lat.push_back(n_cyc - accepted_at - 1);
      waiting = 0;
    end
    if (dut.x_issue_valid && dut.x_issue_ready) begin
      accepted_at = n_cyc; waiting = 1;
    end
  end
  always @(posedge fpu_gated_clk) n_gclk++;

  initial begin
    logic [4:0]  exp_rd  [8] = '{1, 2, 5, 6, 7, 8, 9, 10};
    logic [31:0] exp_val [8] = '{10, 3, 13, 7, 2, 11, 32'h41200000, 32'h40400000};
    logic [31:0] exp_mem [4] = '{32'h41500000,   // 13.0
                                 32'h40E00000,   // 7.0
                                 32'h41F00000,   // 30.0
                                 32'h40555555};  // 10/3 rounded to nearest even
    int          exp_lat [4] = '{1, 1, 1, 29};
    int          sum;

    prog = '{ADDI(1, 0, 10), ADDI(2, 0, 3),
             ADD(5, 1, 2), SUB(6, 1, 2), OP(0, 7, 7, 1, 2), OP(0, 6, 8, 1, 2),
             LUI(9, 20'h41200), SW(9, 0, 12'h100),        // 10.0
             LUI(10, 20'h40400), SW(10, 0, 12'h104),      // 3.0
             FLW(1, 0, 12'h100), FLW(2, 0, 12'h104),
             FOP(0, 3, 1, 2), FOP(1, 4, 1, 2), FOP(2, 5, 1, 2), FOP(3, 6, 1, 2),
             FSW(3, 0, 12'h110), FSW(4, 0, 12'h114), FSW(5, 0, 12'h118), FSW(6, 0, 12'h11C),
             JAL(0, 0)};

    #1 rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(4 * i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    repeat (2) @(negedge clk);
    chk(n_gclk == 0, "no coprocessor clock edges while idle in reset");
    rst_n = 1;

    repeat (200) @(posedge clk);
    chk(pc_out >= 32'(4 * (prog.size() - 1)) && pc_out <= 32'(4 * (prog.size() + 1)),
        $sformatf("program reached its final self-loop (pc %h)", pc_out));

    chk(wb_rd.size() == 8, $sformatf("%0d integer register writes, expected 8", wb_rd.size()));
    for (int i = 0; i < 8 && i < wb_rd.size(); i++)
      chk(wb_rd[i] == exp_rd[i] && wb_val[i] == exp_val[i],
          $sformatf("write %0d: x%0d = %h, expected x%0d = %h", i, wb_rd[i], wb_val[i], exp_rd[i], exp_val[i]));
    if (wb_cycle.size() >= 6)
      chk(wb_cycle[5] - wb_cycle[0] == 5, "six ALU results retire on consecutive cycles");

    for (int i = 0; i < 4; i++) begin
      dbg_addr = 32'h110 + 32'(4 * i); #1;
      chk(dbg_data == exp_mem[i], $sformatf("FP result %0d = %h, expected %h", i, dbg_data, exp_mem[i]));
    end
    chk(fflags == 5'b00001, $sformatf("fflags %b, expected only inexact", fflags));

    chk(lat.size() == 4, $sformatf("%0d coprocessor responses, expected 4", lat.size()));
    sum = 0;
    for (int i = 0; i < 4 && i < lat.size(); i++) begin
      chk(lat[i] == exp_lat[i], $sformatf("request %0d latency %0d, expected %0d", i, lat[i], exp_lat[i]));
      sum += 2 + exp_lat[i];
    end
    chk(n_gclk == sum, $sformatf("gated control clock edges %0d, expected %0d", n_gclk, sum));
    $display("coprocessor latencies %p, gated control clock edges %0d of %0d cycles", lat, n_gclk, n_cyc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
