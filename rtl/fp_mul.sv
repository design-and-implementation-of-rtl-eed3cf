// fp_mul: single-precision multiplier unit of the coprocessor.
//
// Subnormal operands are first normalised (leading one moved to bit 23, the
// exponent lowered to match), so the 24 x 24 significand product always has
// its leading one at bit 47 or 46. The top 28 product bits go to the rounding
// stage with the remaining 20 folded into the sticky bit, and the exponent is
// ea + eb - 127. Special cases: NaN operand -> canonical NaN (NV if
// signalling), inf x 0 -> NaN with NV, inf x finite -> inf, 0 x finite -> 0,
// all with the XOR of the signs. The unrounded result is registered on the
// unit's own gated clock. On an FPGA the product maps onto DSP blocks.
module fp_mul
  import fpu_pkg::*;
(
  input  logic        gclk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output fp_unr_t     res
);
  fp_unr_t            d;
  logic               sgn;
  logic [23:0]        ma, mb;
  logic [4:0]         lza, lzb;
  logic signed [11:0] ea, eb;
  logic [47:0]        p;

  always_comb begin
    sgn = a[31] ^ b[31];
    ma  = {a[30:23] != 8'd0, a[22:0]};
    mb  = {b[30:23] != 8'd0, b[22:0]};
    lza = clz24(ma);
    lzb = clz24(mb);
    ma  = ma << lza;
    mb  = mb << lzb;
    ea  = 12'((a[30:23] == 8'd0) ? 8'd1 : a[30:23]) - 12'(lza);
    eb  = 12'((b[30:23] == 8'd0) ? 8'd1 : b[30:23]) - 12'(lzb);
    p   = ma * mb;

    d = '0;
    if (is_nan(a) || is_nan(b))
      d = mk_special(CANONICAL_NAN, {is_snan(a) || is_snan(b), 4'b0});
    else if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      d = mk_special(CANONICAL_NAN, 5'b10000);
    else if (is_inf(a) || is_inf(b))
      d = mk_special({sgn, 8'hFF, 23'd0}, 5'b0);
    else if (is_zero(a) || is_zero(b))
      d = mk_special({sgn, 31'd0}, 5'b0);
    else begin
      d.sign   = sgn;
      d.exp    = ea + eb - 12'sd127;
      d.mant   = p[47:20];
      d.sticky = |p[19:0];
    end
  end

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) res <= '0;
    else        res <= d;
endmodule
