// fp_addsub: single-precision adder/subtractor unit of the coprocessor.
//
// Combinational datapath: operand b's sign is flipped for subtraction, the
// larger magnitude is put first, the smaller significand is aligned right by
// the exponent difference with the shifted-out bits OR-ed into the lowest
// (sticky) position, and the magnitudes are added or subtracted with three
// extra low-order bits (guard, round, sticky). Subnormal operands use
// exponent 1 and no hidden bit. NaN operands give the canonical quiet NaN
// (NV for a signalling NaN), inf - inf gives NaN with NV, an infinite operand
// otherwise passes through, and an exact zero sum is +0 except -0 + -0.
// The unrounded result is captured in a register on the unit's own gated
// clock, so the unit only toggles in the cycle it is used; the shared
// rounding stage reads the register.
module fp_addsub
  import fpu_pkg::*;
(
  input  logic        gclk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output fp_unr_t     res
);
  fp_unr_t     d;
  logic [31:0] bb, x, y;
  logic [7:0]  ex, ey;
  logic [23:0] mx, my;
  logic [7:0]  diff;
  logic [4:0]  shc;
  logic [59:0] al;
  logic [27:0] bg, sml, sum;
  logic        eff_sub;

  always_comb begin
    bb = {b[31] ^ sub, b[30:0]};
    // Order by magnitude: x is the larger
    if (a[30:0] >= bb[30:0]) begin x = a;  y = bb; end
    else                     begin x = bb; y = a;  end
    ex = (x[30:23] == 8'd0) ? 8'd1 : x[30:23];
    ey = (y[30:23] == 8'd0) ? 8'd1 : y[30:23];
    mx = {x[30:23] != 8'd0, x[22:0]};
    my = {y[30:23] != 8'd0, y[22:0]};
    diff = ex - ey;
    shc  = (diff > 8'd31) ? 5'd31 : diff[4:0];
    bg  = {1'b0, mx, 3'b000};
    al   = {1'b0, my, 3'b000, 32'd0} >> shc;
    sml = {al[59:33], al[32] | (|al[31:0])};
    eff_sub = x[31] ^ y[31];
    sum = eff_sub ? (bg - sml) : (bg + sml);

    d = '0;
    if (is_nan(a) || is_nan(bb)) begin
      d = mk_special(CANONICAL_NAN, {is_snan(a) || is_snan(bb), 4'b0});
    end else if (is_inf(a) && is_inf(bb) && (a[31] != bb[31])) begin
      d = mk_special(CANONICAL_NAN, 5'b10000);
    end else if (is_inf(x)) begin
      d = mk_special(x, 5'b0);
    end else begin
      d.sign = (sum == 28'd0) ? (eff_sub ? 1'b0 : x[31]) : x[31];
      d.exp  = 12'(ex);
      d.mant = sum;
      d.sticky = 1'b0;
    end
  end

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) res <= '0;
    else        res <= d;
endmodule
