// tb_fpu_ctrl: checks the coprocessor control FSM on its own gated clock.
// A stand-in divider done signal is raised a chosen number of cycles into
// EXEC. Checks: issue_ready only when idle; operand latching; which unit
// clock enable is raised and for how long; result_valid timing; the response
// (and its tag) held while result_ready is low; clk_en low while idle and
// while a response waits.
module tb_fpu_ctrl;
  import fpu_pkg::*;

  logic        clk = 0, rst_n = 1, gclk;
  logic        issue_valid = 0, issue_ready, result_valid, result_ready = 0;
  x_req_t      req;
  logic [4:0]  result_rd;
  fp_op_e      op_q;
  logic [31:0] a_q, b_q;
  logic        clk_en, add_en, mul_en, div_en, div_done = 0;
  int          checks = 0, failures = 0;
  int          div_cnt = 0;

  clock_gate cg (.clk, .rst_n, .en(clk_en), .gclk);
  fpu_ctrl dut (.gclk, .rst_n, .issue_valid, .issue_ready, .issue_req(req),
                .result_valid, .result_ready, .result_rd, .op_q, .a_q, .b_q,
                .clk_en, .add_en, .mul_en, .div_en, .div_done);

  always #5 clk = ~clk;

  // stand-in divider: done after 5 enabled cycles
  always @(posedge clk) begin
    div_cnt  <= div_en ? div_cnt + 1 : 0;
    div_done <= div_en && div_cnt == 4;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic op(input fp_op_e o, input int exec_cycles, input int hold);
    int n;
    req.op = o; req.a = $urandom; req.b = $urandom; req.rd = 5'($urandom);
    issue_valid = 1; #1;
    chk(issue_ready, "ready when idle");
    chk(clk_en, "clock requested for a request");
    @(posedge clk); #1;
    issue_valid = 0;
    chk(!issue_ready, "busy after accept");
    chk(op_q == o && a_q == req.a && b_q == req.b, "operands latched");
    n = 0;
    while (!result_valid && n < 50) begin
      chk(add_en == (o == FP_ADD || o == FP_SUB) && mul_en == (o == FP_MUL) && div_en == (o == FP_DIV),
          "one unit enabled in EXEC");
      chk(clk_en, "control clock on in EXEC");
      @(posedge clk); #1; n++;
    end
    chk(n == exec_cycles, $sformatf("EXEC length %0d exp %0d", n, exec_cycles));
    chk(result_rd == req.rd, "result tag");
    repeat (hold) begin
      chk(result_valid && !clk_en && !add_en && !mul_en && !div_en, "response held, clocks off");
      @(posedge clk); #1;
    end
    result_ready = 1; #1;
    chk(clk_en, "clock requested for hand-over");
    @(posedge clk); #1;
    result_ready = 0;
    chk(!result_valid && issue_ready, "back to idle");
    repeat (2) begin
      chk(!clk_en, "idle without request: clock off");
      @(posedge clk); #1;
    end
  endtask

  initial begin
    req = '0;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    op(FP_ADD, 1, 0);
    op(FP_SUB, 1, 3);
    op(FP_MUL, 1, 1);
    op(FP_DIV, 6, 2);
    for (int i = 0; i < 20; i++) begin
      fp_op_e o;
      o = fp_op_e'($urandom_range(3));
      op(o, o == FP_DIV ? 6 : 1, int'($urandom_range(3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
