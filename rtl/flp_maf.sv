// flp_maf: three-stage single-precision multiply-add-fused unit, result = B*C + A
// (or B*C - A when sub = 1), with extended-precision multiplicands.
//
// Besides the 24-bit mantissas of B and C the unit accepts two 24-bit extensions,
// mbp2 and mcp2, which are the next 24 fraction bits below the LSB of m_B and m_C.
// The mantissa product is approximated as m_B*m_C + m_B*mCp2 + m_C*mBp2 (the
// mBp2*mCp2 term, below 2^-48, is dropped), which gives a 2.70 fixed-point product.
// This lets the unit evaluate 1 - 2^-v with 47-bit operands, the case that needs the
// extra precision in LNS subtraction.  The structure follows the document: three
// 24x24 multipliers and the alignment shifter of m_A in stage one, a wide mantissa
// adder, complementer and leading-zero detection in stage two, normalisation, rounding
// and post-normalisation in stage three, with special-case, sign and exponent logic
// running alongside.
//
// Mantissa adder field, F[99:0] (this design's layout, 100 bits with the sticky bit):
//   F[98:75]  m_A before alignment, i.e. the addend starts 27 binades above the product
//   F[72:1]   the 2.70 product (F[71] has weight 2^0 of the product exponent)
//   F[0]      sticky bit of the m_A bits shifted out of the field
// so only a right shift of m_A is needed.  When m_A would need a left shift the
// product is below a quarter ULP of A and is kept only for rounding.
//
// Rounding is IEEE round-to-nearest-even.  Subnormal inputs and results are flushed to
// zero, exponent overflow gives infinity, invalid operations (inf*0, inf-inf, NaN in)
// give the default NaN; no exception flags are produced.
//
// Timing: each stage has its own register bank loaded when en1, en2, en3 is high
// (the MAF1_st, MAF2_st, MAF3_st controls); `result` is the stage-three register.
module flp_maf
  import hyb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en1,
  input  logic        en2,
  input  logic        en3,
  input  word_t       a,
  input  word_t       b,
  input  word_t       c,
  input  logic [23:0] mbp2,     // fraction bits 2^-24..2^-47 of M_B
  input  logic [23:0] mcp2,     // fraction bits 2^-24..2^-47 of M_C
  input  logic        sub,      // 1: B*C - A
  output word_t       result
);

  // ---------------------------------------------------------------- stage one
  typedef struct packed {
    logic        nan;
    logic        inf;
    logic        inf_sign;
    logic        sp;          // sign of the product
    logic        eff_sub;     // A enters the adder negated
    logic signed [11:0] ep;   // biased exponent that F[71] refers to
    logic [47:0] p_bc;        // m_B * m_C
    logic [47:0] p_bx;        // m_B * mCp2
    logic [47:0] p_cx;        // m_C * mBp2
    logic [98:0] a_al;        // aligned m_A, F[98:0]
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    logic [23:0] ma, mb, mc, mbx;
    logic        za, zb, zc, ia, ib, ic, sa;
    logic signed [11:0] ep_prod, sh_raw;
    logic [6:0]  sh;
    logic [195:0] shf;

    za = is_zero(a);  zb = is_zero(b);  zc = is_zero(c);
    ia = is_inf(a);   ib = is_inf(b);   ic = is_inf(c);
    ma  = za ? 24'd0 : {1'b1, a.fr};
    mb  = zb ? 24'd0 : {1'b1, b.fr};
    mc  = zc ? 24'd0 : {1'b1, c.fr};
    mbx = zb ? 24'd0 : mbp2;

    // sign processing
    sa             = a.sign ^ sub;
    s1_d.sp        = b.sign ^ c.sign;
    s1_d.eff_sub   = sa ^ s1_d.sp;

    // special case handling
    s1_d.nan      = is_nan(a) || is_nan(b) || is_nan(c) ||
                    ((ib || ic) && (zb || zc)) ||
                    ((ib || ic) && ia && (sa != s1_d.sp));
    s1_d.inf      = ia || ib || ic;
    s1_d.inf_sign = (ib || ic) ? s1_d.sp : sa;

    // exponent processing: shift amount of m_A
    ep_prod = $signed({4'd0, b.ex}) + $signed({4'd0, c.ex}) - 12'sd127;
    sh_raw  = ep_prod + 12'sd27 - $signed({4'd0, a.ex});
    if (zb || zc || sh_raw < 0) begin
      s1_d.ep = $signed({4'd0, a.ex}) - 12'sd27;
      sh      = 7'd0;
    end else begin
      s1_d.ep = ep_prod;
      sh      = (sh_raw > 12'sd99) ? 7'd99 : sh_raw[6:0];
    end

    // alignment shifter; bits leaving the field collapse into the sticky bit
    shf       = {ma, 74'd0, 98'd0} >> sh;
    s1_d.a_al = {shf[195:98], |shf[97:0]};

    // the three 24x24 multipliers
    s1_d.p_bc = mb * mc;
    s1_d.p_bx = mb * mcp2;
    s1_d.p_cx = mc * mbx;
  end

  always_ff @(posedge clk) begin
    if (rst)      s1_q <= '0;
    else if (en1) s1_q <= s1_d;
  end

  // ---------------------------------------------------------------- stage two
  typedef struct packed {
    logic        nan;
    logic        inf;
    logic        inf_sign;
    logic        sign;
    logic        zero;
    logic signed [11:0] ep;
    logic [6:0]  lz;          // leading zeros of mag
    logic [99:0] mag;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    logic [71:0]  prod;
    logic [100:0] sum;       // two's complement, bit 100 is the sign
    logic [100:0] aterm;

    prod  = {s1_q.p_bc, 24'd0} + {24'd0, s1_q.p_bx} + {24'd0, s1_q.p_cx};
    aterm = {2'b00, s1_q.a_al};
    if (s1_q.eff_sub) aterm = ~aterm + 101'd1;          // complementor (stage one output)
    sum   = {28'd0, prod, 1'b0} + aterm;                 // mantissa adder

    s2_d.nan      = s1_q.nan;
    s2_d.inf      = s1_q.inf;
    s2_d.inf_sign = s1_q.inf_sign;
    s2_d.ep       = s1_q.ep;
    if (sum[100]) begin                                   // complementor after the adder
      s2_d.mag  = 100'(~sum + 101'd1);
      s2_d.sign = ~s1_q.sp;
    end else begin
      s2_d.mag  = sum[99:0];
      s2_d.sign = s1_q.sp;
    end
    s2_d.zero = (sum == '0);
    if (s2_d.zero) s2_d.sign = s1_q.eff_sub ? 1'b0 : s1_q.sp;

    // leading-zero detection
    s2_d.lz = 7'd100;
    for (int i = 0; i < 100; i++)
      if (s2_d.mag[i]) s2_d.lz = 7'(99 - i);
  end

  always_ff @(posedge clk) begin
    if (rst)      s2_q <= '0;
    else if (en2) s2_q <= s2_d;
  end

  // -------------------------------------------------------------- stage three
  word_t res_d;

  always_comb begin
    logic [99:0] nrm;
    logic [24:0] mr;          // rounded mantissa with carry
    logic        guard, sticky, lsb;
    logic signed [11:0] e;

    nrm    = s2_q.mag << s2_q.lz;                         // normalisation shifter
    lsb    = nrm[76];
    guard  = nrm[75];
    sticky = |nrm[74:0];
    mr     = {1'b0, nrm[99:76]} + 25'(guard && (sticky || lsb));   // rounding
    e      = s2_q.ep + 12'sd28 - $signed({5'd0, s2_q.lz});           // exponent adjustment
    if (mr[24]) begin                                     // post-normalisation
      mr = mr >> 1;
      e  = e + 12'sd1;
    end

    if (s2_q.nan)            res_d = W_NAN;
    else if (s2_q.inf)       res_d = '{sign: s2_q.inf_sign, ex: 8'hFF, fr: 23'd0};
    else if (s2_q.zero)      res_d = '{sign: s2_q.sign, ex: 8'd0, fr: 23'd0};
    else if (e >= 12'sd255)  res_d = '{sign: s2_q.sign, ex: 8'hFF, fr: 23'd0};
    else if (e <= 12'sd0)    res_d = '{sign: s2_q.sign, ex: 8'd0, fr: 23'd0};
    else                     res_d = '{sign: s2_q.sign, ex: e[7:0], fr: mr[22:0]};
  end

  always_ff @(posedge clk) begin
    if (rst)      result <= '0;
    else if (en3) result <= res_d;
  end

endmodule
