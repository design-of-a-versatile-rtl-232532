// div_log_unit: three-stage FLP division and logarithm unit based on multiplicative
// normalisation.
//
// The divisor mantissa X = 1.m_X is driven towards 1 by three factors whose product
// approximates 1/X:
//   stage one   (1 + S1 2^-8) = k/256 from a 256-entry reciprocal table addressed by the
//               top 8 fraction bits of X, k = floor(65536 / (257 + i)); X1 = X k/256 <= 1
//   stage two   (1 + S2 2^-15) with S2 = bits 7..15 of 1 - X1;     X2 = X1 (1 + S2 2^-15)
//   stage three (1 + S3 2^-28) with S3 = bits 1..28 of 1 - X2
// The same factors multiply the dividend mantissa (Multiplier1, 3, 5), giving the
// quotient A/X, which is normalised and rounded to nearest even.  In parallel the
// logarithm is accumulated:
//   log2(1.m_X) = -log2(k/256) - log2(1 + S2 2^-15) - log2(1 + S3 2^-28)
// where the first two terms come from tables (256 and 512 entries, 40 fraction bits,
// images rtl/log1_tab.hex = round(-log2(k_i/256) 2^40) and rtl/log2_tab.hex =
// round(log2(1 + j 2^-15) 2^40)) and the third is S3 2^-28 / ln 2.  The LNS result is
//   z = d_I.d_F + E_X - 127 + log2(1.m_X)           (LNS add/sub, d from the exp unit)
//   z = E_X + log2(1.m_X), sign of X               (FLP-to-LNS, d = 0, the 127 omitted)
// rounded to 23 fraction bits.  The output multiplexer returns the FLP quotient for
// FLP division and z otherwise.
//
// The three-stage algorithm, the tables and the stage partition follow the document.
// This design widens S2 to 9 bits (bits 7..15): with a truncating 8-bit reciprocal table
// the first residual 1 - X1 reaches 0.0092, above 2^-7, so bit 7 is not always zero;
// S3 likewise takes all bits down to 2^-28.  Internal widths (31 fraction bits after
// stage one, 46 after stage two and three, 40 for the logarithm) are this design's.
// The quotient is accurate to about 2^-26 before rounding, so it is within one ULP of
// the correctly rounded value but not always equal to it.
//
// Special values: FLP division follows IEEE conventions (x/0 = inf, 0/0 = inf/inf =
// NaN) with flush-to-zero; FLP-to-LNS maps 0, inf, NaN to the LNS ones; for LNS add/sub
// a special d is passed through and X = 0 (exact cancellation) gives LNS zero.  z below
// 1.0 (integer field 0) becomes zero, z of 255.0 or more becomes infinity.
//
// Timing: register banks after each stage, loaded by en1, en2, en3 (DIV1_st, DIV2_st,
// DIV3_st); `result` is the stage-three register.
module div_log_unit
  import hyb_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en1,
  input  logic  en2,
  input  logic  en3,
  input  logic  fdiv,         // 1: FLP division, result is A/X
  input  logic  to_lns,       // 1: FLP-to-LNS, the -127 term is omitted, sign from X
  input  word_t a,            // dividend (1.0 unless FLP division)
  input  word_t x,            // divisor / logarithm argument
  input  word_t d,            // LNS base (0.0 unless LNS add/sub)
  output word_t result
);

  // ---------------------------------------------------------------- stage one
  function automatic logic [7:0] recip_value(int unsigned i);
    return 8'(65536 / (257 + i));
  endfunction

  logic [7:0] recip_rom [256];
  for (genvar gi = 0; gi < 256; gi++) begin : g_recip
    assign recip_rom[gi] = recip_value(gi);
  end

  typedef struct packed {
    logic        fdiv;
    logic        q_nan, q_inf, q_zero, q_sign;
    logic        z_special;
    word_t       z_spec_val;
    logic        z_sign;
    logic signed [11:0] eq;       // biased quotient exponent
    logic [31:0] a1;              // 1.31
    logic [31:0] x1;              // 1.31
    logic signed [55:0] zacc;     // 40 fraction bits
  } s1_t;

  s1_t        s1_d, s1_q;
  logic [7:0] k;
  logic [40:0] log1;

  assign k = recip_rom[x.fr[22:15]];

  hex_rom #(.WIDTH(41), .DEPTH(256), .FILE("rtl/log1_tab.hex")) u_log1_tab (
    .addr (x.fr[22:15]),
    .data (log1)
  );

  always_comb begin
    logic za, zx, ia, ix, na, nx, zd;
    za = is_zero(a);  zx = is_zero(x);  zd = is_zero(d);
    ia = is_inf(a);   ix = is_inf(x);
    na = is_nan(a);   nx = is_nan(x);

    s1_d.fdiv   = fdiv;
    // special case handler
    s1_d.q_nan  = na || nx || (za && zx) || (ia && ix);
    s1_d.q_inf  = ia || zx;
    s1_d.q_zero = za || ix;
    s1_d.q_sign = a.sign ^ x.sign;

    s1_d.z_special  = 1'b0;
    s1_d.z_spec_val = W_ZERO;
    if (to_lns) begin
      s1_d.z_sign = x.sign;
      if (nx)      begin s1_d.z_special = 1'b1; s1_d.z_spec_val = W_NAN; end
      else if (ix) begin s1_d.z_special = 1'b1; s1_d.z_spec_val = '{sign: x.sign, ex: 8'hFF, fr: 23'd0}; end
      else if (zx) begin s1_d.z_special = 1'b1; s1_d.z_spec_val = '{sign: x.sign, ex: 8'd0, fr: 23'd0}; end
    end else begin
      s1_d.z_sign = d.sign;
      if (zd || d.ex == 8'hFF) begin s1_d.z_special = 1'b1; s1_d.z_spec_val = d; end
      else if (nx) begin s1_d.z_special = 1'b1; s1_d.z_spec_val = W_NAN; end
      else if (zx) begin s1_d.z_special = 1'b1; s1_d.z_spec_val = '{sign: d.sign, ex: 8'd0, fr: 23'd0}; end
    end

    // exponent processing
    s1_d.eq = $signed({4'd0, a.ex}) - $signed({4'd0, x.ex}) + 12'sd127;

    // Multiplier1, Multiplier2
    s1_d.a1 = {1'b1, a.fr} * k;
    s1_d.x1 = {1'b1, x.fr} * k;

    // Adder10, Adder11, Adder12: d + E_X - (127 or 0) + (-log2(k/256))
    s1_d.zacc = $signed({25'd0, zd ? 31'd0 : {d.ex, d.fr}} << 17)
              + $signed({48'd0, x.ex} << 40)
              - (to_lns ? 56'sd0 : $signed(56'd127 << 40))
              + $signed({15'd0, log1});
  end

  always_ff @(posedge clk) begin
    if (rst)      s1_q <= '0;
    else if (en1) s1_q <= s1_d;
  end

  // ---------------------------------------------------------------- stage two
  typedef struct packed {
    logic        fdiv;
    logic        q_nan, q_inf, q_zero, q_sign;
    logic        z_special;
    word_t       z_spec_val;
    logic        z_sign;
    logic signed [11:0] eq;
    logic [47:0] a2;              // 2.46
    logic [47:0] x2;              // 2.46
    logic signed [55:0] zacc;
  } s2_t;

  s2_t        s2_d, s2_q;
  logic [8:0] s2f;
  logic [39:0] log2v;

  always_comb begin
    logic [31:0] delta1;
    delta1 = 32'h8000_0000 - s1_q.x1;          // 1 - X1, 31 fraction bits
    s2f    = delta1[24:16];                    // fraction bits 7..15
  end

  hex_rom #(.WIDTH(40), .DEPTH(512), .FILE("rtl/log2_tab.hex")) u_log2_tab (
    .addr (s2f),
    .data (log2v)
  );

  always_comb begin
    s2_d.fdiv       = s1_q.fdiv;
    s2_d.q_nan      = s1_q.q_nan;
    s2_d.q_inf      = s1_q.q_inf;
    s2_d.q_zero     = s1_q.q_zero;
    s2_d.q_sign     = s1_q.q_sign;
    s2_d.z_special  = s1_q.z_special;
    s2_d.z_spec_val = s1_q.z_spec_val;
    s2_d.z_sign     = s1_q.z_sign;
    s2_d.eq         = s1_q.eq;
    // Multiplier3, Multiplier4: Y (1 + S2 2^-15), exact with 46 fraction bits
    s2_d.a2   = ({16'd0, s1_q.a1} << 15) + 48'(s1_q.a1) * 48'(s2f);
    s2_d.x2   = ({16'd0, s1_q.x1} << 15) + 48'(s1_q.x1) * 48'(s2f);
    s2_d.zacc = s1_q.zacc - $signed({16'd0, log2v});
  end

  always_ff @(posedge clk) begin
    if (rst)      s2_q <= '0;
    else if (en2) s2_q <= s2_d;
  end

  // -------------------------------------------------------------- stage three
  word_t res_d;

  always_comb begin
    logic [47:0] delta2;
    logic [27:0] s3f;
    logic [75:0] a3p;
    logic [47:0] a3;
    logic [68:0] l3p;
    logic signed [55:0] zfin, zr;
    logic [24:0] mr;
    logic        guard, sticky, lsb;
    logic signed [11:0] e;
    word_t q, z;

    delta2 = 48'h4000_0000_0000 - s2_q.x2;     // 1 - X2, 46 fraction bits
    s3f    = delta2[45:18];                    // fraction bits 1..28
    // Multiplier5: A3 = A2 (1 + S3 2^-28)
    a3p    = 76'(s2_q.a2) * 76'(s3f);
    a3     = s2_q.a2 + 48'(a3p >> 28);
    // -(ln 2)^-1 S3 2^-28, 40 fraction bits
    l3p    = 69'(s3f) * 69'(INVLN2_F40);
    zfin   = s2_q.zacc - $signed({15'd0, 41'(l3p >> 28)});

    // normalisation, rounding and post-normalisation of the quotient
    e = s2_q.eq;
    if (!a3[46]) begin
      a3 = a3 << 1;
      e  = e - 12'sd1;
    end
    lsb    = a3[23];
    guard  = a3[22];
    sticky = |a3[21:0];
    mr     = {1'b0, a3[46:23]} + 25'(guard && (lsb || sticky));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 12'sd1;
    end

    if (s2_q.q_nan)          q = W_NAN;
    else if (s2_q.q_inf)     q = '{sign: s2_q.q_sign, ex: 8'hFF, fr: 23'd0};
    else if (s2_q.q_zero)    q = '{sign: s2_q.q_sign, ex: 8'd0,  fr: 23'd0};
    else if (e >= 12'sd255)  q = '{sign: s2_q.q_sign, ex: 8'hFF, fr: 23'd0};
    else if (e <= 12'sd0)    q = '{sign: s2_q.q_sign, ex: 8'd0,  fr: 23'd0};
    else                     q = '{sign: s2_q.q_sign, ex: e[7:0], fr: mr[22:0]};

    // LNS result: round to 23 fraction bits and pack
    zr = (zfin + 56'sd65536) >>> 17;
    if (s2_q.z_special)            z = s2_q.z_spec_val;
    else if (zr < $signed(56'd1 << 23))   z = '{sign: s2_q.z_sign, ex: 8'd0,  fr: 23'd0};
    else if (zr >= $signed(56'd255 << 23)) z = '{sign: s2_q.z_sign, ex: 8'hFF, fr: 23'd0};
    else                           z = '{sign: s2_q.z_sign, ex: zr[30:23], fr: zr[22:0]};

    res_d = s2_q.fdiv ? q : z;
  end

  always_ff @(posedge clk) begin
    if (rst)      result <= '0;
    else if (en3) result <= res_d;
  end

endmodule
