// exp_unit: operand generator that lets the MAF unit evaluate exponentials.
//
// For LNS-to-FLP (x = a) it produces B = (-1)^s_a * 2^(a_I - 127) * 2^(0.f1) and
// C = 2^(0.f2 * 2^-8), where 0.a_F = 0.f1 f2 with f1 the top 8 and f2 the low 15
// fraction bits; the MAF then computes B*C + 0 = 2^(a_I.a_F - 127) as an FLP number.
// For LNS add/sub it forms v = |a - b| from the two LNS exponents, rewrites
// 2^-v as 2^(v' - 127) with v' = 127 - v, and produces B = +/-2^(v'_I - 127) * 2^(0.v'_F1)
// (minus for an effective subtraction) and C = 2^(0.v'_F2 * 2^-8), so that the MAF,
// given A = 1.0, computes X = 1 +/- 2^-v.  It also outputs d, the input of larger
// magnitude with the sign it carries in the operation, which becomes the sign and the
// base of the result z = d + log2(X).
//
// Both mantissas are 1.47 fixed-point values: the upper 24 bits go into the FLP
// operand, the lower 24 bits (mBp2, mCp2) go to the MAF's extra multipliers.
//   * 2^(0.f1) comes from a 256-entry table: round(2^(i/256) * 2^47).
//   * 2^(f2 * 2^-8 / 2^15) = e^(w * 2^-8) with w = 0.f2 * ln 2 (constant multiplier), by
//     the series 1 + w 2^-8 + w^2/2 2^-16 + w^3/6 2^-24 + w^4/24 2^-32.  The squared
//     term is computed directly.  With w = w21 + w22 * 2^-8 (8 and 15 bits) the third and
//     fourth order terms are taken as a 256-entry table of w21^3/6 2^-24 + w21^4/24 2^-32
//     plus the correction (1/2) w21^2 w22 2^-32 from a small multiplier.  The sum is kept
//     with 56 fraction bits and rounded to 47.
//     This approximation of the cubic term leaves out (1/2) w21 w22^2 2^-40, an error of
//     up to about 2^-41.5 in M_C, which only shows in LNS subtraction of operands closer
//     than about 2^-20 in the logarithm; it is kept as described.
// The split of the operand, the series, the table and correction, and the operand
// assignments follow the document; the fixed-point widths of the intermediate terms,
// the biased form of v' and the special-value handling are this design's choices.
//
// Special values: zero, infinite or NaN inputs force B to zero (so X = 1.0 and
// z = d) and d carries the special result; for LNS-to-FLP B carries the special value
// and C = 1.0.  A v larger than 127 also forces B to zero (2^-v is below 2^-127).
//
// Purely combinational; the caller registers B, C, mbp2, mcp2 and d.
// C always has sign 0 and exponent 127 (1.0 <= M_C < 2^(2^-8)), so its sign, exponent
// and leading fraction bits are constant; they are kept as a full FLP word because the
// MAF takes C in that format.
module exp_unit
  import hyb_pkg::*;
(
  input  opcode_t     op,
  input  word_t       a,        // R1
  input  word_t       b,        // R2
  output word_t       b_op,     // B operand of the MAF
  output logic [23:0] mbp2,
  output word_t       c_op,     // C operand of the MAF
  output logic [23:0] mcp2,
  output word_t       d         // LNS base of the add/sub result
);

  // third + fourth order series terms, in units of 2^-56, indexed by w21 = i/256
  function automatic logic [29:0] t34_value(int unsigned i);
    longint unsigned ii, v;
    ii = longint'(i);
    v  = (ii * ii * ii << 18) + ii * ii * ii * ii;
    return 30'((v + 64'd3072) / 64'd6144);
  endfunction

  logic [29:0] t34_rom [256];
  for (genvar gi = 0; gi < 256; gi++) begin : g_t34
    assign t34_rom[gi] = t34_value(gi);
  end

  logic        lns_as, to_flp, a_ge, b_eff_sign, eff_sub, force_zero;
  logic [30:0] v, vp;
  logic [31:0] vp_full;
  logic [22:0] frac;            // fraction whose 2^0.frac is computed
  logic [47:0] mb_full;         // 2^(0.f1), 1.47
  logic [47:0] mc_full;         // 2^(0.f2 2^-8), 1.47
  word_t       b_eff;

  assign lns_as = (op == OP_LNS_ADD) || (op == OP_LNS_SUB);
  assign to_flp = (op == OP_LNS_TO_FLP);

  // comparators and subtractors: v = |a - b|, v' = 127 - v
  assign b_eff_sign = b.sign ^ (op == OP_LNS_SUB);
  assign b_eff      = '{sign: b_eff_sign, ex: b.ex, fr: b.fr};
  assign a_ge       = a[30:0] >= b[30:0];
  assign v          = a_ge ? (a[30:0] - b[30:0]) : (b[30:0] - a[30:0]);
  assign vp_full    = {1'b0, 8'd127, 23'd0} - {1'b0, v};
  assign vp         = vp_full[30:0];
  assign eff_sub    = a.sign ^ b_eff_sign;

  // MUX1: the fraction to exponentiate
  assign frac = to_flp ? a.fr : vp[22:0];

  // 2^(0.f1) table
  hex_rom #(.WIDTH(48), .DEPTH(256), .FILE("rtl/exp2_tab.hex")) u_exp2_tab (
    .addr (frac[22:15]),
    .data (mb_full)
  );

  // 2^(0.f2 * 2^-8) by the truncated series
  always_comb begin
    logic [62:0]  wprod;
    logic [47:0]  w;          // 0.w, 48 fraction bits
    logic [95:0]  wsq;
    logic [7:0]   w21;
    logic [14:0]  w22;
    logic [63:0]  t1, t2, t34, tx, sum56;
    logic [31:0]  sqmpy;

    wprod = 63'(frac[14:0]) * 63'(LN2_F48);               // constant multiplier
    w     = wprod[62:15];
    wsq   = w * w;
    w21   = w[47:40];
    w22   = w[39:25];
    t1    = 64'(w);                                       // w 2^-8
    t2    = 64'(wsq >> 57);                               // w^2/2 2^-16
    t34   = 64'(t34_rom[w21]);                            // lookup table
    sqmpy = 32'(w21) * 32'(w21) * 32'(w22);               // SQR and MPY circuit
    tx    = 64'(sqmpy >> 8);                              // (1/2) w21^2 w22 2^-32
    sum56 = t1 + t2 + t34 + tx;
    mc_full = {1'b1, 47'((sum56 + 64'd256) >> 9)};
  end

  // special case handler, sign processing, pack, MUX3
  always_comb begin
    logic za, zb, sa, sb;
    za = is_zero(a);
    zb = is_zero(b);
    sa = a.sign;
    sb = b_eff_sign;
    force_zero = 1'b0;
    d          = W_ZERO;

    if (to_flp) begin
      b_op = '{sign: a.sign, ex: a.ex, fr: mb_full[46:24]};
      if (za) b_op = '{sign: a.sign, ex: 8'd0, fr: 23'd0};
      else if (a.ex == 8'hFF) b_op = a;
      mbp2 = (za || a.ex == 8'hFF) ? 24'd0 : mb_full[23:0];
      c_op = (za || a.ex == 8'hFF) ? W_ONE : '{sign: 1'b0, ex: 8'd127, fr: mc_full[46:24]};
      mcp2 = (za || a.ex == 8'hFF) ? 24'd0 : mc_full[23:0];
    end else if (lns_as) begin
      d  = a_ge ? a : b_eff;
      if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && sa != sb)) begin
        d = W_NAN;  force_zero = 1'b1;
      end else if (is_inf(a)) begin
        d = a;      force_zero = 1'b1;
      end else if (is_inf(b)) begin
        d = b_eff;  force_zero = 1'b1;
      end else if (za && zb) begin
        d = W_ZERO; force_zero = 1'b1;
      end else if (za) begin
        d = b_eff;  force_zero = 1'b1;
      end else if (zb) begin
        d = a;      force_zero = 1'b1;
      end
      // 2^-v below 2^-126 cannot change 1.0 at 47 fraction bits
      if (vp_full[31] || vp[30:23] == 8'd0) force_zero = 1'b1;

      if (force_zero) begin
        b_op = W_ZERO;
        mbp2 = 24'd0;
      end else begin
        b_op = '{sign: eff_sub, ex: vp[30:23], fr: mb_full[46:24]};
        mbp2 = mb_full[23:0];
      end
      c_op = '{sign: 1'b0, ex: 8'd127, fr: mc_full[46:24]};
      mcp2 = mc_full[23:0];
    end else begin
      b_op = W_ZERO;
      mbp2 = 24'd0;
      c_op = W_ONE;
      mcp2 = 24'd0;
    end
  end

endmodule
