// tb_fp_addsub: random and directed check of the adder/subtractor unit.
// The registered unrounded result is rounded by fp_round and compared with
// the double-precision reference model (fp_ref_pkg). Also checks that the
// result register only changes on a gated-clock edge.
module tb_fp_addsub;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        gclk = 0, rst_n = 1, sub;
  logic [31:0] a, b, res, exp_res;
  logic [4:0]  fl, exp_fl;
  fp_unr_t     r;
  int          checks = 0, failures = 0;

  fp_addsub dut (.gclk, .rst_n, .a, .b, .sub, .res(r));
  fp_round  rnd (.in(r), .result(res), .flags(fl));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    a = ta; b = tb_; sub = ts;
    #1 gclk = 1; #1 gclk = 0; #1;
    ref_op(ts ? 1 : 0, ta, tb_, exp_res, exp_fl);
    checks++;
    if (res !== exp_res || fl !== exp_fl) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s %h %h: got %h/%b exp %h/%b", ts ? "sub" : "add", ta, tb_, res, fl, exp_res, exp_fl);
    end
  endtask

  initial begin
    logic [31:0] x, y, held;
    a = 0; b = 0; sub = 0;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    #1 rst_n = 1;
    run(32'h3F800000, 32'h40000000, 0);  // 1 + 2 = 3
    run(32'h3F800000, 32'h3F800000, 1);  // 1 - 1 = +0
    run(32'h80000000, 32'h80000000, 0);  // -0 + -0 = -0
    run(32'h7F800000, 32'h7F800000, 1);  // inf - inf = NaN, NV
    run(32'h7F7FFFFF, 32'h7F7FFFFF, 0);  // overflow
    run(32'h00000001, 32'h00000001, 0);  // subnormal sum
    run(32'h3F800000, 32'h33800000, 0);  // 1 + 2^-24: tie, even -> 1
    run(32'h3F800001, 32'h33800000, 0);  // tie, odd -> round up
    run(32'h7F800001, 32'h3F800000, 0);  // sNaN -> NV
    for (int i = 0; i < 4000; i++) begin
      rnd_pair(0, x, y);
      run(x, y, 1'($urandom));
    end
    // Without a gated-clock edge the result register must hold.
    held = res;
    a = 32'h40400000; b = 32'h40400000; #5;
    checks++;
    if (res !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
