// tb_fp_mul: random and directed check of the multiplier unit against the
// double-precision reference model, through the rounding stage. Covers
// subnormal operands, underflow to subnormal/zero, overflow and specials.
module tb_fp_mul;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        gclk = 0, rst_n = 1;
  logic [31:0] a, b, res, exp_res;
  logic [4:0]  fl, exp_fl;
  fp_unr_t     r;
  int          checks = 0, failures = 0;

  fp_mul   dut (.gclk, .rst_n, .a, .b, .res(r));
  fp_round rnd (.in(r), .result(res), .flags(fl));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1 gclk = 1; #1 gclk = 0; #1;
    ref_op(2, ta, tb_, exp_res, exp_fl);
    checks++;
    if (res !== exp_res || fl !== exp_fl) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h %h: got %h/%b exp %h/%b", ta, tb_, res, fl, exp_res, exp_fl);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    a = 0; b = 0;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    #1 rst_n = 1;
    run(32'h40400000, 32'h40000000);  // 3 * 2 = 6
    run(32'h7F800000, 32'h00000000);  // inf * 0 = NaN, NV
    run(32'hFF800000, 32'h40000000);  // -inf
    run(32'h7F000000, 32'h7F000000);  // overflow
    run(32'h00800000, 32'h3F000000);  // min normal / 2 -> subnormal, exact
    run(32'h00000003, 32'h3F000000);  // 3 ulp / 2 -> tie to even, UF NX
    run(32'h00000001, 32'h4B000000);  // subnormal * 2^23
    for (int i = 0; i < 4000; i++) begin
      rnd_pair(2, x, y);
      if ($urandom_range(1)) run(x, y); else run(y, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
