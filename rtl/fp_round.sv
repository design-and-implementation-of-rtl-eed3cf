// fp_round: post-normalisation and rounding into IEEE-754 single precision.
//
// Input is an fp_unr_t from one of the arithmetic units. A special record
// passes through unchanged. Otherwise the 28-bit significand is shifted so
// its leading one sits at bit 27 (count-leading-zeros), the exponent is
// adjusted, and:
//  * exponent >= 255 before rounding: overflow to infinity (OF, NX);
//  * exponent <= 0: the significand is shifted right into the subnormal
//    range, the shifted-out bits folding into the sticky bit; tininess is
//    detected here, before rounding, and UF is raised when the result is also
//    inexact;
//  * rounding is to nearest, ties to even, by adding the increment to the
//    packed {exponent, fraction}, so a carry out of the fraction moves the
//    exponent up and a carry into 255 gives infinity (OF).
// NX is raised when guard or sticky bits were lost. Only round-to-nearest-
// even is implemented. Purely combinational.
module fp_round
  import fpu_pkg::*;
(
  input  fp_unr_t     in,
  output logic [31:0] result,
  output logic [4:0]  flags
);
  logic [4:0]         lz;
  logic [27:0]        m1, m2;
  logic signed [12:0] e1;
  logic [12:0]        sh;
  logic [4:0]         shc;
  logic [58:0]        ext;
  logic               tiny, g, s, inc;
  logic [7:0]         efield;
  logic [22:0]        frac;
  logic [30:0]        packed_mag;

  always_comb begin
    lz = 5'd27;
    for (int i = 0; i < 28; i++)
      if (in.mant[i]) lz = 5'(27 - i);
    m1 = in.mant << lz;
    e1 = 13'(in.exp) + 13'sd1 - 13'($unsigned(lz));

    sh  = 13'sd1 - e1;
    shc = (e1 > 0) ? 5'd0 : (sh > 13'd31) ? 5'd31 : sh[4:0];
    ext = {m1, 31'd0} >> shc;
    m2  = ext[58:31];
    tiny = (e1 < 13'sd1);

    if (tiny) begin
      efield = 8'd0;
      frac   = m2[26:4];
      g      = m2[3];
      s      = (|m2[2:0]) | (|ext[30:0]) | in.sticky;
    end else begin
      efield = e1[7:0];
      frac   = m1[26:4];
      g      = m1[3];
      s      = (|m1[2:0]) | in.sticky;
    end
    inc        = g & (s | frac[0]);
    packed_mag = {efield, frac} + 31'(inc);

    flags = '0;
    if (in.special) begin
      result = in.special_val;
      flags  = in.special_flags;
    end else if (in.mant == 28'd0) begin
      result = {in.sign, 31'd0};
    end else if (e1 >= 13'sd255) begin
      result        = {in.sign, 8'hFF, 23'd0};
      flags[FL_OF]  = 1'b1;
      flags[FL_NX]  = 1'b1;
    end else begin
      result        = {in.sign, packed_mag};
      flags[FL_NX]  = g | s;
      flags[FL_UF]  = tiny & (g | s);
      flags[FL_OF]  = (packed_mag[30:23] == 8'hFF);
    end
  end
endmodule
