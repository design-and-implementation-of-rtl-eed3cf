// fpu_pkg: types shared by the floating-point coprocessor and the core.
//
// fp_op_e is the 3-bit operation code carried by a coprocessor request.
// fp_unr_t is the hand-off format between an arithmetic unit (adder,
// multiplier, divider) and the shared normalisation/rounding stage: either a
// finished special result (NaN, infinity, exact zero) or an unrounded value
//   value = (-1)^sign * mant * 2^(exp - 127 - 26)   (plus a sticky bit)
// so a significand with its leading one at bit 26 and exp in 1..254 is an
// ordinary normal number. x_req_t / x_rsp_t are the payloads of the
// coprocessor request and response channels; the valid/ready signals travel
// beside them. Flag bit order follows RISC-V fflags: {NV, DZ, OF, UF, NX}.
package fpu_pkg;

  typedef enum logic [2:0] {
    FP_ADD = 3'd0,
    FP_SUB = 3'd1,
    FP_MUL = 3'd2,
    FP_DIV = 3'd3
  } fp_op_e;

  localparam int FL_NV = 4;
  localparam int FL_DZ = 3;
  localparam int FL_OF = 2;
  localparam int FL_UF = 1;
  localparam int FL_NX = 0;

  localparam logic [31:0] CANONICAL_NAN = 32'h7FC0_0000;

  typedef struct packed {
    logic               special;       // special_val is the final result
    logic [31:0]        special_val;
    logic [4:0]         special_flags;
    logic               sign;
    logic signed [11:0] exp;
    logic [27:0]        mant;
    logic               sticky;
  } fp_unr_t;

  typedef struct packed {
    fp_op_e      op;
    logic [31:0] a;
    logic [31:0] b;
    logic [4:0]  rd;
  } x_req_t;

  typedef struct packed {
    logic [31:0] data;
    logic [4:0]  rd;
    logic [4:0]  flags;
  } x_rsp_t;

  function automatic logic is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 23'd0);
  endfunction

  function automatic logic is_snan(input logic [31:0] x);
    return is_nan(x) && !x[22];
  endfunction

  function automatic logic is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 23'd0);
  endfunction

  function automatic logic is_zero(input logic [31:0] x);
    return x[30:0] == 31'd0;
  endfunction

  // Leading zeros of a 24-bit significand (24 when zero).
  function automatic logic [4:0] clz24(input logic [23:0] m);
    logic [4:0] n;
    n = 5'd24;
    for (int i = 0; i < 24; i++)
      if (m[i]) n = 5'(23 - i);
    return n;
  endfunction

  // Special-result record: the rounding stage passes it through unchanged.
  function automatic fp_unr_t mk_special(input logic [31:0] v, input logic [4:0] fl);
    fp_unr_t u;
    u = '0;
    u.special = 1'b1;
    u.special_val = v;
    u.special_flags = fl;
    return u;
  endfunction

endpackage
