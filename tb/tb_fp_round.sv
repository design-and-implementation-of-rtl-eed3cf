// tb_fp_round: drives unrounded values straight into the rounding stage and
// compares with the reference rounding of the exact value
// (mant + sticky * 2^(msb-30)) * 2^(exp-153), the sticky bit standing for a
// remainder below every bit of mant. Covers normal, subnormal, overflow,
// rounding carry into the exponent, and special pass-through.
module tb_fp_round;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  fp_unr_t     u;
  logic [31:0] res, exp_res;
  logic [4:0]  fl, exp_fl;
  int          checks = 0, failures = 0;

  fp_round dut (.in(u), .result(res), .flags(fl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic s, input int e, input logic [27:0] m, input logic st);
    real v;
    int  msb;
    u = '0; u.sign = s; u.exp = 12'(e); u.mant = m; u.sticky = st;
    #1;
    // sticky stands for a non-zero remainder below every bit of m
    msb = 0;
    for (int i = 0; i < 28; i++) if (m[i]) msb = i;
    v = (real'(m) + (st ? pow2(msb - 30) : 0.0)) * pow2(e - 153) * (s ? -1.0 : 1.0);
    if (m == 0) begin exp_res = {s, 31'd0}; exp_fl = 0; end
    else real2sgl(v, exp_res, exp_fl);
    checks++;
    if (res !== exp_res || fl !== exp_fl) begin
      failures++;
      if (failures < 10) $display("FAIL round s=%0d e=%0d m=%h st=%0d: got %h/%b exp %h/%b", s, e, m, st, res, fl, exp_res, exp_fl);
    end
  endtask

  initial begin
    run(0, 127, 28'h4000000, 0);          // 1.0
    run(1, 127, 28'h7FFFFFF, 0);          // rounds up to 2.0
    run(0, 254, 28'h7FFFFF8, 0);          // rounds into overflow
    run(0, 300, 28'h4000000, 0);          // overflow
    run(0, 0,   28'h4000000, 0);          // subnormal boundary
    run(0, -30, 28'h4000000, 1);          // far below: +0 or min subnormal, UF NX
    run(0, 1,   28'h0000001, 0);          // leading zeros, tiny
    for (int i = 0; i < 5000; i++)
      run(1'($urandom), int'($urandom_range(340)) - 60, 28'($urandom), 1'($urandom));
    // special pass-through
    u = mk_special(32'h7FC00000, 5'b10000);
    #1 checks++;
    if (res !== 32'h7FC00000 || fl !== 5'b10000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
