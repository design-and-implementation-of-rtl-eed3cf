// fp_ref_pkg: reference model for the floating-point test benches.
//
// Works independently of the RTL: operands are converted to `real` (double)
// exactly, the operation is done in double precision, and the double is
// rounded to single precision (nearest-even) by field manipulation of its
// 64-bit encoding. Products of two singles are exact in double; sums are
// exact when the exponent difference stays below about 29 (the random
// stimulus keeps it so); quotients are rounded twice, which cannot move a
// result across a single-precision midpoint for 24-bit significands.
// Tininess is detected before rounding, as in the design. Also holds the
// random operand generator used by several benches.
package fp_ref_pkg;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r * 0.5;
    return r;
  endfunction

  function automatic real sgl2real(input logic [31:0] x);
    int  e;
    real m;
    e = (x[30:23] == 0) ? 1 : int'(x[30:23]);
    m = real'({x[30:23] != 0, x[22:0]});
    return (x[31] ? -1.0 : 1.0) * m * pow2(e - 150);
  endfunction

  // Round a double to single precision; flags {NV,DZ,OF,UF,NX}.
  function automatic void real2sgl(input real r, output logic [31:0] res, output logic [4:0] fl);
    logic [63:0] d;
    logic        s;
    int          E, sh;
    logic [52:0] sig;
    logic [23:0] keep;
    logic        g, st, inc, tiny;
    logic [24:0] rk;
    int          ebias;
    d = $realtobits(r);
    s = d[63];
    fl = '0;
    if (d[62:0] == 0) begin res = {s, 31'd0}; return; end
    E   = int'(d[62:52]) - 1023;
    sig = {1'b1, d[51:0]};
    tiny = (E < -126);
    sh = tiny ? 29 + (-126 - E) : 29;
    if (sh > 53) begin keep = 0; g = 0; st = 1; end
    else begin
      keep = 24'(sig >> sh);
      g    = sig[sh-1];
      st   = 1'b0;
      for (int i = 0; i < sh - 1; i++) st |= sig[i];
    end
    inc = g & (st | keep[0]);
    rk  = {1'b0, keep} + 25'(inc);
    ebias = tiny ? 0 : E + 127;
    // renormalise after rounding carry
    if (!tiny && rk[24]) begin ebias++; rk = rk >> 1; end
    if (tiny && rk[23]) ebias = 1;           // rounded up into the normal range
    fl[0] = g | st;
    fl[1] = tiny & (g | st);
    if (ebias >= 255) begin
      res = {s, 8'hFF, 23'd0};
      fl[2] = 1'b1; fl[0] = 1'b1;
    end else begin
      res = {s, 8'(ebias), rk[22:0]};
    end
  endfunction

  function automatic logic nan_(input logic [31:0] x);  return x[30:23] == 8'hFF && x[22:0] != 0; endfunction
  function automatic logic snan_(input logic [31:0] x); return nan_(x) && !x[22]; endfunction
  function automatic logic inf_(input logic [31:0] x);  return x[30:23] == 8'hFF && x[22:0] == 0; endfunction
  function automatic logic zero_(input logic [31:0] x); return x[30:0] == 0; endfunction

  // op: 0 add, 1 sub, 2 mul, 3 div
  function automatic void ref_op(input int op, input logic [31:0] a, input logic [31:0] b0,
                                 output logic [31:0] res, output logic [4:0] fl);
    logic [31:0] b;
    logic        sx;
    real         r;
    b  = (op == 1) ? {~b0[31], b0[30:0]} : b0;
    sx = a[31] ^ b[31];
    fl = '0;
    if (nan_(a) || nan_(b)) begin
      res = 32'h7FC00000; fl[4] = snan_(a) || snan_(b); return;
    end
    if (op <= 1) begin
      if (inf_(a) && inf_(b) && a[31] != b[31]) begin res = 32'h7FC00000; fl[4] = 1; return; end
      if (inf_(a)) begin res = a; return; end
      if (inf_(b)) begin res = b; return; end
      r = sgl2real(a) + sgl2real(b);
      if (r == 0.0) begin res = {(zero_(a) && zero_(b)) ? (a[31] & b[31]) : 1'b0, 31'd0}; return; end
    end else if (op == 2) begin
      if ((inf_(a) && zero_(b)) || (zero_(a) && inf_(b))) begin res = 32'h7FC00000; fl[4] = 1; return; end
      if (inf_(a) || inf_(b)) begin res = {sx, 8'hFF, 23'd0}; return; end
      if (zero_(a) || zero_(b)) begin res = {sx, 31'd0}; return; end
      r = sgl2real(a) * sgl2real(b);
    end else begin
      if ((zero_(a) && zero_(b)) || (inf_(a) && inf_(b))) begin res = 32'h7FC00000; fl[4] = 1; return; end
      if (inf_(a)) begin res = {sx, 8'hFF, 23'd0}; return; end
      if (zero_(b)) begin res = {sx, 8'hFF, 23'd0}; fl[3] = 1; return; end
      if (zero_(a) || inf_(b)) begin res = {sx, 31'd0}; return; end
      r = sgl2real(a) / sgl2real(b);
    end
    real2sgl(r, res, fl);
  endfunction

  // Random single with exponent field in [elo, ehi] (0 gives subnormals).
  function automatic logic [31:0] rnd_fp(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Random operand pair for op; sums keep exponents within 20 of each other.
  function automatic void rnd_pair(input int op, output logic [31:0] a, output logic [31:0] b);
    int k, ea;
    k = int'($urandom_range(19));
    if (k == 0) begin                        // specials mixed in
      logic [31:0] sp [8] = '{32'h0, 32'h80000000, 32'h7F800000, 32'hFF800000,
                              32'h7FC00000, 32'h7F800001, 32'h3F800000, 32'hBF800001};
      a = sp[$urandom_range(7)];
      b = sp[$urandom_range(7)];
    end else if (op <= 1) begin
      ea = (k < 3) ? int'($urandom_range(20)) : (k < 5) ? 230 + int'($urandom_range(24)) : 20 + int'($urandom_range(210));
      a = rnd_fp(ea, ea);
      b = rnd_fp(ea < 20 ? 0 : ea - 20, ea + 20 > 254 ? 254 : ea + 20);
      if (k == 5) b = {~a[31], a[30:0]};     // exact cancellation
      if (k == 6) b = {~a[31], a[30:8], 8'($urandom)};  // massive cancellation
    end else begin
      if (k < 3)      begin a = rnd_fp(0, 40);    b = rnd_fp(80, 140);  end  // underflow region
      else if (k < 5) begin a = rnd_fp(190, 254); b = rnd_fp(100, 200); end  // overflow region
      else if (k < 7) begin a = rnd_fp(0, 0);     b = rnd_fp(100, 160); end  // subnormal operand
      else            begin a = rnd_fp(64, 190);  b = rnd_fp(64, 190);  end
      if (op == 3 && k == 8) b = rnd_fp(0, 0);
    end
  endfunction

endpackage
