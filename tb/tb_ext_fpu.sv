// tb_ext_fpu: end-to-end check of the clock-gated coprocessor through its
// request/response handshake. Random FADD/FSUB/FMUL/FDIV requests with random
// gaps and random response back-pressure; every response is compared with the
// reference model (data, flags and destination tag). Also checked per
// operation: the latency from acceptance to x_result_valid (1 / 29 / 2 edges
// for add-sub-mul / divide / special divide), and the number of rising edges
// each gated clock delivered: the control clock 3 (+ divide steps), the used
// unit 1 (divider 29 or 2), unused units 0 - the clock-gating claim that only
// the active module is clocked.
module tb_ext_fpu;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic   clk = 0, rst_n = 1;
  logic   x_issue_valid = 0, x_issue_ready, x_result_valid, x_result_ready = 0;
  x_req_t req;
  x_rsp_t rsp;
  logic   gclk_ctrl, gclk_add, gclk_mul, gclk_div;
  int     checks = 0, failures = 0;
  int     n_ctrl, n_add, n_mul, n_div, n_master;

  ext_fpu dut (.clk, .rst_n, .x_issue_valid, .x_issue_ready, .x_issue_req(req),
               .x_result_valid, .x_result_ready, .x_result(rsp),
               .gclk_ctrl, .gclk_add, .gclk_mul, .gclk_div);

  always #5 clk = ~clk;
  always @(posedge gclk_ctrl) n_ctrl++;
  always @(posedge gclk_add)  n_add++;
  always @(posedge gclk_mul)  n_mul++;
  always @(posedge gclk_div)  n_div++;
  always @(posedge clk)       n_master++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int op, input logic [31:0] a, input logic [31:0] b, input int hold);
    logic [31:0] er;
    logic [4:0]  ef;
    int          lat, exp_lat, e_ctrl, e_add, e_mul, e_div;
    logic        special;
    n_ctrl = 0; n_add = 0; n_mul = 0; n_div = 0;
    req.op = fp_op_e'(op); req.a = a; req.b = b; req.rd = 5'($urandom);
    x_issue_valid = 1;
    #1 chk(x_issue_ready, "issue_ready when idle");
    @(posedge clk); #1;
    x_issue_valid = 0;
    lat = 0;
    while (!x_result_valid && lat < 100) begin @(posedge clk); #1; lat++; end
    special = nan_(a) || nan_(b) || inf_(a) || inf_(b) || zero_(a) || zero_(b);
    exp_lat = (op == 3) ? (special ? 2 : 29) : 1;
    chk(lat == exp_lat, $sformatf("latency %0d exp %0d (op %0d)", lat, exp_lat, op));
    repeat (hold) begin @(posedge clk); #1; end
    chk(x_result_valid, "response held under back-pressure");
    ref_op(op, a, b, er, ef);
    chk(rsp.data == er && rsp.flags == ef && rsp.rd == req.rd,
        $sformatf("op %0d %h %h: got %h/%b exp %h/%b", op, a, b, rsp.data, rsp.flags, er, ef));
    x_result_ready = 1;
    @(posedge clk); #1;
    x_result_ready = 0;
    chk(!x_result_valid && x_issue_ready, "idle after hand-over");
    e_ctrl = 2 + exp_lat;
    e_add  = (op <= 1) ? 1 : 0;
    e_mul  = (op == 2) ? 1 : 0;
    e_div  = (op == 3) ? exp_lat : 0;
    chk(n_ctrl == e_ctrl && n_add == e_add && n_mul == e_mul && n_div == e_div,
        $sformatf("gated edges ctrl/add/mul/div %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d",
                  n_ctrl, n_add, n_mul, n_div, e_ctrl, e_add, e_mul, e_div));
  endtask

  initial begin
    logic [31:0] a, b;
    int op, idle;
    req = '0;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // idle coprocessor: no gated edges at all
    n_ctrl = 0; n_add = 0; n_mul = 0; n_div = 0;
    repeat (20) @(posedge clk);
    #1 chk(n_ctrl == 0 && n_add == 0 && n_mul == 0 && n_div == 0, "idle: all clocks gated off");
    run(0, 32'h41200000, 32'h40400000, 0);   // 10 + 3 = 13
    run(1, 32'h41200000, 32'h40400000, 2);   // 10 - 3 = 7
    run(2, 32'h41200000, 32'h40400000, 0);   // 10 * 3 = 30
    run(3, 32'h41200000, 32'h40400000, 1);   // 10 / 3
    run(3, 32'h41200000, 32'h00000000, 0);   // 10 / 0: DZ
    for (int i = 0; i < 600; i++) begin
      op = int'($urandom_range(3));
      rnd_pair(op, a, b);
      idle = int'($urandom_range(3));
      repeat (idle) @(posedge clk);
      #1 run(op, a, b, int'($urandom_range(2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
