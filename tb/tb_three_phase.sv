// tb_three_phase: accuracy test of the whole processor in three phases, for all seven
// instructions, at the default parameters.
//
//   Phase 1, special values: every pair of operands from {+0, -0, +inf, -inf, NaN, +1,
//            -1, a large and a small normal word}.  The class of the result (zero,
//            infinity, NaN, finite) and the sign of an infinite result are compared with
//            the IEEE-style rules of each instruction, worked out here.
//   Phase 2, integer parts: the exponent (FLP) or integer part of the logarithm (LNS)
//            of the first operand is swept over every value that keeps the result in
//            range, with random fractions.
//   Phase 3, fractions: the integer part is fixed and 2048 fractions are taken, the
//            leading 11 fraction bits stepping through all values and the rest random.
//
// Results are compared with double-precision references (tb_util_pkg::op_error): FLP
// MAF and LNS-to-FLP within 0.5 ULP, FLP division and FLP-to-LNS within 1 LSB, LNS
// add/sub within 1.44 LSB of the logarithm, i.e. a relative error of the value below
// 2^-23.  The test a hardware evaluation would run has millions of cases per
// instruction; this one keeps the same phases at a size a simulator finishes in seconds.  The host side writes the control word and the operands on the input
// stream and reads the result from the output stream without stalls.
module tb_three_phase;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] fsl_s_data, fsl_m_data;
  logic        fsl_s_exists, fsl_s_read, fsl_m_write, fsl_m_full, busy;
  int          checks = 0, failures = 0;

  hybrid_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  n_case [3][8];
  real max_err [8];

  task automatic exec(input opcode_t op, input logic [31:0] r1, r2, r3,
                      output logic [31:0] res);
    logic [31:0] words [4];
    int nw, sent;
    words[0] = {29'd0, 3'(op)};
    words[1] = r1; words[2] = r2; words[3] = r3;
    nw = 1 + int'(operand_count(op));
    sent = 0;
    fsl_s_exists = 1'b1;
    while (sent < nw) begin
      fsl_s_data = words[sent];
      #1;
      if (fsl_s_read) sent++;
      @(posedge clk);
      #1;
    end
    fsl_s_exists = 1'b0;
    while (!fsl_m_write) begin @(posedge clk); #1; end
    res = fsl_m_data;
    @(posedge clk);
    #1;
  endtask

  function automatic real tol_of(opcode_t op);
    case (op)
      OP_FLP_MAF_ADD, OP_FLP_MAF_SUB, OP_LNS_TO_FLP: return 0.5001;
      OP_FLP_DIV, OP_FLP_TO_LNS:                     return 1.0;
      default:                                       return 1.44;
    endcase
  endfunction

  task automatic check_finite(input int phase, input opcode_t op,
                              input logic [31:0] r1, r2, r3);
    logic [31:0] res;
    real e;
    exec(op, r1, r2, r3, res);
    n_case[phase][op]++;
    e = op_error(3'(op), r1, r2, r3, res);
    checks++;
    if (e != -1.0 && abs_r(e) > tol_of(op)) begin
      failures++;
      if (failures < 20)
        $display("FAIL phase %0d op %0d: r1=%h r2=%h r3=%h got=%h err=%g",
                 phase + 1, op, r1, r2, r3, res, e);
    end
    if (e != -1.0 && abs_r(e) > max_err[op]) max_err[op] = abs_r(e);
  endtask

  // ---------------------------------------------------------------- phase 1
  typedef enum logic [1:0] {C_FIN, C_ZERO, C_INF, C_NAN} cls_t;

  function automatic cls_t cls(logic [31:0] w);
    if (w[30:23] == 8'd0)           return C_ZERO;
    if (w[30:23] != 8'hFF)          return C_FIN;
    return (w[22:0] == 23'd0) ? C_INF : C_NAN;
  endfunction

  // expected class of the result and sign of an infinite result
  function automatic void expect_special(input opcode_t op, input logic [31:0] r1, r2, r3,
                                         output cls_t c, output logic s);
    cls_t k1, k2, k3;
    logic sp, sa, sb;
    k1 = cls(r1); k2 = cls(r2); k3 = cls(r3);
    s = 1'b0;
    case (op)
      OP_FLP_MAF_ADD, OP_FLP_MAF_SUB: begin
        sp = r2[31] ^ r3[31];
        sa = r1[31] ^ (op == OP_FLP_MAF_SUB);
        if (k1 == C_NAN || k2 == C_NAN || k3 == C_NAN) c = C_NAN;
        else if ((k2 == C_INF || k3 == C_INF) && (k2 == C_ZERO || k3 == C_ZERO)) c = C_NAN;
        else if ((k2 == C_INF || k3 == C_INF) && k1 == C_INF && sa != sp) c = C_NAN;
        else if (k2 == C_INF || k3 == C_INF) begin c = C_INF; s = sp; end
        else if (k1 == C_INF) begin c = C_INF; s = sa; end
        else if (k1 == C_ZERO && (k2 == C_ZERO || k3 == C_ZERO)) c = C_ZERO;
        else c = C_FIN;
      end
      OP_FLP_DIV: begin
        s = r1[31] ^ r2[31];
        if (k1 == C_NAN || k2 == C_NAN) c = C_NAN;
        else if ((k1 == C_ZERO && k2 == C_ZERO) || (k1 == C_INF && k2 == C_INF)) c = C_NAN;
        else if (k1 == C_INF || k2 == C_ZERO) c = C_INF;
        else if (k1 == C_ZERO || k2 == C_INF) c = C_ZERO;
        else c = C_FIN;
      end
      OP_FLP_TO_LNS, OP_LNS_TO_FLP: begin
        c = k1;
        s = r1[31];
      end
      default: begin
        sb = r2[31] ^ (op == OP_LNS_SUB);
        if (k1 == C_NAN || k2 == C_NAN) c = C_NAN;
        else if (k1 == C_INF && k2 == C_INF && r1[31] != sb) c = C_NAN;
        else if (k1 == C_INF) begin c = C_INF; s = r1[31]; end
        else if (k2 == C_INF) begin c = C_INF; s = sb; end
        else if (k1 == C_ZERO && k2 == C_ZERO) c = C_ZERO;
        else if (r1[30:0] == r2[30:0] && r1[31] != sb) c = C_ZERO;
        else c = C_FIN;
      end
    endcase
  endfunction

  task automatic check_special(input opcode_t op, input logic [31:0] r1, r2, r3);
    logic [31:0] res;
    cls_t c;
    logic s;
    real e;
    exec(op, r1, r2, r3, res);
    n_case[0][op]++;
    expect_special(op, r1, r2, r3, c, s);
    // an exact cancellation of finite operands gives zero
    if (c == C_FIN && cls(res) == C_ZERO && op_error(3'(op), r1, r2, r3, res) == -1.0) c = C_ZERO;
    checks++;
    if (cls(res) != c || (c == C_INF && res[31] != s)) begin
      failures++;
      if (failures < 20)
        $display("FAIL phase 1 op %0d: r1=%h r2=%h r3=%h got=%h expected class %0d sign %0d",
                 op, r1, r2, r3, res, c, s);
    end else if (c == C_FIN) begin
      // a finite result of finite operands must also be accurate
      e = op_error(3'(op), r1, r2, r3, res);
      checks++;
      if (e != -1.0 && abs_r(e) > tol_of(op)) begin
        failures++;
        $display("FAIL phase 1 op %0d: r1=%h r2=%h r3=%h got=%h err=%g", op, r1, r2, r3, res, e);
      end
    end
  endtask

  logic [31:0] spec [9];

  function automatic logic [31:0] rnd(int e);
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic logic [31:0] rnd_fr(int e, int j);
    return {1'($urandom), 8'(e), 11'(j), 12'($urandom)};
  endfunction

  initial begin
    logic [31:0] x, y;
    int eb;
    rst = 1; fsl_s_exists = 0; fsl_s_data = '0; fsl_m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    spec = '{W_ZERO, 32'h8000_0000, W_INF, 32'hFF80_0000, W_NAN, W_ONE, 32'hBF80_0000,
             32'h4B12_3456, 32'h3A65_4321};

    // phase 1: special values
    for (int o = 0; o < 7; o++)
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < 9; j++) begin
          case (opcode_t'(o))
            OP_FLP_MAF_ADD, OP_FLP_MAF_SUB: begin
              check_special(opcode_t'(o), spec[i], spec[j], W_ONE);
              check_special(opcode_t'(o), spec[j], W_ONE, spec[i]);
            end
            OP_FLP_TO_LNS, OP_LNS_TO_FLP: if (j == 0) check_special(opcode_t'(o), spec[i], 32'd0, 32'd0);
            default: check_special(opcode_t'(o), spec[i], spec[j], 32'd0);
          endcase
        end

    // phase 2: every integer part / exponent of the first operand
    for (int e = 1; e <= 254; e++) begin
      // MAF: addend exponent e, product near 1
      eb = 100 + int'($urandom % 55);
      check_finite(1, OP_FLP_MAF_ADD, rnd(e), rnd(eb), rnd(254 - eb));
      check_finite(1, OP_FLP_MAF_SUB, rnd(e), rnd(eb), rnd(254 - eb));
      // also the product exponent swept, addend near it
      eb = (e + 127) / 2;
      if (e <= 252) check_finite(1, OP_FLP_MAF_ADD, rnd((e > 2) ? e - 1 : e), rnd(eb), rnd(e + 127 - eb));
      if (e >= 3 && e <= 252) begin
        check_finite(1, OP_FLP_DIV, rnd(e), rnd(127), 32'd0);
        check_finite(1, OP_FLP_DIV, rnd(127), rnd(e), 32'd0);
      end
      check_finite(1, OP_FLP_TO_LNS, rnd(e), 32'd0, 32'd0);
      check_finite(1, OP_LNS_TO_FLP, rnd(e), 32'd0, 32'd0);
      if (e >= 3 && e <= 253) begin
        x = rnd(e);
        y = {1'($urandom), x[30:0] - 31'(8388608 + $urandom % 8388608)};
        check_finite(1, OP_LNS_ADD, x, y, 32'd0);
        check_finite(1, OP_LNS_SUB, x, y, 32'd0);
        check_finite(1, OP_LNS_ADD, y, x, 32'd0);
      end
    end

    // phase 3: all leading 11 fraction bits at fixed integer parts
    for (int j = 0; j < 2048; j++) begin
      check_finite(2, OP_FLP_MAF_ADD, rnd_fr(131, j), rnd_fr(127, j), rnd(128));
      check_finite(2, OP_FLP_MAF_SUB, rnd_fr(128, j), rnd_fr(127, 2047 - j), rnd(127));
      check_finite(2, OP_FLP_DIV, rnd(130), rnd_fr(127, j), 32'd0);
      check_finite(2, OP_FLP_TO_LNS, rnd_fr(127, j), 32'd0, 32'd0);
      check_finite(2, OP_LNS_TO_FLP, rnd_fr(127, j), 32'd0, 32'd0);
      // LNS add/sub: v = 0.j (fraction sweep of the distance), v from 2^-11 to 1
      x = rnd(140);
      y = {1'($urandom), x[30:0] - 31'({j, 12'($urandom)}) - 31'd4096};
      check_finite(2, OP_LNS_ADD, x, y, 32'd0);
      check_finite(2, OP_LNS_SUB, x, y, 32'd0);
    end

    for (int k = 0; k < 7; k++) begin
      $display("opcode %0d: phase 1 %0d, phase 2 %0d, phase 3 %0d cases, max error %g",
               k, n_case[0][k], n_case[1][k], n_case[2][k], max_err[k]);
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (n_case[p][k] == 0) begin failures++; $display("FAIL no phase %0d case for %0d", p + 1, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
