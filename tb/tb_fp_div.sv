// tb_fp_div: check of the iterative divider. Each division is started, the
// number of gated-clock cycles until done is checked (27 steps: done in the
// 29th cycle for ordinary operands, the 2nd for special ones), and the result
// is rounded by fp_round and compared with the reference model.
module tb_fp_div;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        gclk = 0, rst_n = 1, start = 0, done;
  logic [31:0] a, b, res, exp_res;
  logic [4:0]  fl, exp_fl;
  fp_unr_t     r;
  int          checks = 0, failures = 0;

  fp_div   dut (.gclk, .rst_n, .start, .a, .b, .done, .res(r));
  fp_round rnd (.in(r), .result(res), .flags(fl));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); #1 gclk = 1; #1 gclk = 0; #1; endtask

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_);
    int n, exp_n;
    logic special;
    a = ta; b = tb_; start = 1;
    n = 0;
    do begin tick(); n++; end while (!done && n < 100);
    tick();                // FIN -> IDLE; result registers hold
    start = 0;
    ref_op(3, ta, tb_, exp_res, exp_fl);
    special = nan_(ta) || nan_(tb_) || inf_(ta) || inf_(tb_) || zero_(ta) || zero_(tb_);
    exp_n = special ? 1 : 28;
    checks += 2;
    if (n !== exp_n) begin
      failures++;
      if (failures < 10) $display("FAIL div latency %0d exp %0d", n, exp_n);
    end
    if (res !== exp_res || fl !== exp_fl) begin
      failures++;
      if (failures < 10) $display("FAIL div %h %h: got %h/%b exp %h/%b", ta, tb_, res, fl, exp_res, exp_fl);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    a = 0; b = 0;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    #1 rst_n = 1;
    run(32'h40C00000, 32'h40000000);  // 6 / 2 = 3
    run(32'h3F800000, 32'h40400000);  // 1 / 3, inexact
    run(32'h3F800000, 32'h00000000);  // 1 / 0 = inf, DZ
    run(32'h00000000, 32'h00000000);  // 0 / 0 = NaN, NV
    run(32'h7F7FFFFF, 32'h3E800000);  // overflow
    run(32'h00800000, 32'h41000000);  // underflow to subnormal
    run(32'h00000001, 32'h00000003);  // subnormal / subnormal
    for (int i = 0; i < 1500; i++) begin
      rnd_pair(3, x, y);
      if ($urandom_range(1)) run(x, y); else run(y, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
