// fp_div: single-precision divider unit of the coprocessor.
//
// Iterative radix-2 restoring division of the significands, one quotient bit
// per cycle of the unit's own gated clock. Both significands are normalised
// first (subnormals included), so the quotient lies in (0.5, 2). Starting from
// rem = ma, each of 27 steps compares rem with mb, sets the quotient bit and
// subtracts when rem >= mb, and shifts rem left; the result is
// q = floor(ma * 2^26 / mb) with a non-zero final remainder as sticky bit, and
// exponent ea - eb + 127. Special cases finish in the load cycle: NaN operand
// -> canonical NaN (NV if signalling), 0/0 and inf/inf -> NaN with NV,
// finite/0 -> inf with DZ, inf/finite -> inf, finite/inf and 0/finite -> 0.
//
// Timing: the cycle `start` is first seen (state IDLE) loads the operands; 27
// RUN cycles follow; `done` is high in the FIN cycle and the unit returns to
// IDLE on the next edge while the result registers hold their value, so res
// remains valid after done falls until the next start.
module fp_div
  import fpu_pkg::*;
(
  input  logic        gclk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        done,
  output fp_unr_t     res
);
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_FIN} dstate_e;

  dstate_e            state;
  logic [4:0]         cnt;
  logic [24:0]        rem;
  logic [23:0]        divisor;
  logic [26:0]        q;
  logic               special;
  logic [31:0]        special_val;
  logic [4:0]         special_flags;
  logic               sign;
  logic signed [11:0] exp;

  logic [23:0]        ma, mb;
  logic [4:0]         lza, lzb;
  logic               sgn;
  logic [24:0]        rem_sub;
  logic               ge;

  always_comb begin
    sgn = a[31] ^ b[31];
    ma  = {a[30:23] != 8'd0, a[22:0]};
    mb  = {b[30:23] != 8'd0, b[22:0]};
    lza = clz24(ma);
    lzb = clz24(mb);
    ge  = (rem >= {1'b0, divisor});
    rem_sub = ge ? (rem - {1'b0, divisor}) : rem;
  end

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) begin
      state <= D_IDLE;
      cnt <= '0; rem <= '0; divisor <= '0; q <= '0;
      special <= 1'b0; special_val <= '0; special_flags <= '0;
      sign <= 1'b0; exp <= '0;
    end else begin
      unique case (state)
        D_IDLE: if (start) begin
          sign          <= sgn;
          special_flags <= '0;
          q             <= '0;
          rem           <= {1'b0, ma << lza};
          divisor       <= mb << lzb;
          cnt           <= 5'd26;
          exp           <= 12'((a[30:23] == 8'd0) ? 8'd1 : a[30:23]) - 12'(lza)
                         - (12'((b[30:23] == 8'd0) ? 8'd1 : b[30:23]) - 12'(lzb))
                         + 12'sd127;
          special       <= 1'b1;
          state         <= D_FIN;
          if (is_nan(a) || is_nan(b)) begin
            special_val   <= CANONICAL_NAN;
            special_flags <= {is_snan(a) || is_snan(b), 4'b0};
          end else if ((is_zero(a) && is_zero(b)) || (is_inf(a) && is_inf(b))) begin
            special_val   <= CANONICAL_NAN;
            special_flags <= 5'b10000;
          end else if (is_inf(a)) begin
            special_val   <= {sgn, 8'hFF, 23'd0};
          end else if (is_zero(b)) begin
            special_val   <= {sgn, 8'hFF, 23'd0};
            special_flags <= 5'b01000;
          end else if (is_zero(a) || is_inf(b)) begin
            special_val   <= {sgn, 31'd0};
          end else begin
            special <= 1'b0;
            state   <= D_RUN;
          end
        end
        D_RUN: begin
          q   <= {q[25:0], ge};
          rem <= {rem_sub[23:0], 1'b0};
          cnt <= cnt - 5'd1;
          if (cnt == 5'd0) state <= D_FIN;
        end
        default: state <= D_IDLE;
      endcase
    end

  assign done = (state == D_FIN);

  always_comb begin
    res               = '0;
    res.special       = special;
    res.special_val   = special_val;
    res.special_flags = special_flags;
    res.sign          = sign;
    res.exp           = exp;
    res.mant          = {1'b0, q};
    res.sticky        = (rem != 25'd0);
  end
endmodule
