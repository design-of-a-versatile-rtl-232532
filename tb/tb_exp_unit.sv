// tb_exp_unit: self-checking testbench of the exponential unit (combinational).
// LNS-to-FLP: checks that sign and exponent of B pass through, C has exponent 127, and
// that the 47-bit mantissas satisfy M_B * M_C = 2^(0.e_F) to better than 5e-13 (the truncated series neglects a
// w21*w22^2 cross term of up to about 2^-41.5).
// LNS add/sub: checks 2^(E_B - 127) * M_B * M_C = 2^-|a-b|, the sign of B
// (effective subtraction), the choice of d (larger magnitude, effective sign) and the
// special-value paths (zero, infinity, NaN operands, v > 127).
module tb_exp_unit;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  opcode_t     op;
  word_t       a, b, b_op, c_op, d;
  logic [23:0] mbp2, mcp2;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  exp_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mant47(word_t w, logic [23:0] x);
    return 1.0 + real'(w.fr) / 8388608.0 + real'(x) / 140737488355328.0;
  endfunction

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: op=%0d a=%h b=%h B=%h mbp2=%h C=%h mcp2=%h d=%h",
               what, op, a, b, b_op, mbp2, c_op, mcp2, d);
    end
  endtask

  real prod, ref_v, rel, v;
  int  eb;

  initial begin
    // LNS-to-FLP
    for (int i = 0; i < 4000; i++) begin
      op = OP_LNS_TO_FLP;
      a  = rand_flp(1, 254);
      if (i < 256) a.fr = {8'(i), 15'($urandom)};
      b  = 32'($urandom);
      #1;
      prod  = mant47(b_op, mbp2) * mant47(c_op, mcp2);
      ref_v = $pow(2.0, real'(a.fr) / 8388608.0);
      rel   = (prod - ref_v) / ref_v;
      expect_true(b_op.sign == a.sign && b_op.ex == a.ex && c_op.ex == 8'd127 && !c_op.sign,
                  "l2f fields");
      expect_true(rel < 5.0e-13 && rel > -5.0e-13, "l2f mantissa 2^0.eF");
    end

    // LNS add / sub
    for (int i = 0; i < 4000; i++) begin
      logic bs;
      op = (i % 2 == 1) ? OP_LNS_SUB : OP_LNS_ADD;
      a  = {1'($urandom), 8'(60 + $urandom % 120), 23'($urandom)};
      b  = a;
      b.sign = 1'($urandom);
      case (i % 4)
        0: b[30:0] = a[30:0] - 31'($urandom % 8388608);          // v < 1
        1: b[30:0] = a[30:0] + 31'($urandom % 8388608);
        2: b[30:0] = a[30:0] - 31'($urandom % (30 * 8388608));   // v < 30
        default: b[30:0] = {8'(60 + $urandom % 120), 23'($urandom)};
      endcase
      #1;
      bs = b.sign ^ (op == OP_LNS_SUB);
      v  = lns2log(a) - lns2log(b);
      if (v < 0.0) v = -v;
      if (a[30:0] >= b[30:0]) expect_true(d == a, "d = a");
      else                    expect_true(d == {bs, b[30:0]}, "d = b");
      if (v == 0.0 && a.sign != bs) begin
        expect_true(b_op.sign == 1'b1 && b_op.ex == 8'd127, "v = 0 subtraction operand");
      end else begin
        eb    = int'(b_op.ex);
        prod  = $pow(2.0, real'(eb - 127)) * mant47(b_op, mbp2) * mant47(c_op, mcp2);
        ref_v = $pow(2.0, -v);
        rel   = (prod - ref_v) / ref_v;
        expect_true(rel < 5.0e-13 && rel > -5.0e-13, "2^-v");
        expect_true(b_op.sign == (a.sign ^ bs), "effective operation sign");
      end
    end

    // special values
    op = OP_LNS_ADD; a = {1'b0, 8'd200, 23'd5}; b = {1'b0, 8'd20, 23'd9}; #1;
    expect_true(b_op == W_ZERO && d == a, "v > 127 drops 2^-v");
    op = OP_LNS_ADD; a = W_ZERO; b = {1'b1, 8'd100, 23'd9}; #1;
    expect_true(b_op == W_ZERO && d == b, "0 + b");
    op = OP_LNS_SUB; a = {1'b1, 8'd100, 23'd9}; b = W_ZERO; #1;
    expect_true(b_op == W_ZERO && d == a, "a - 0");
    op = OP_LNS_SUB; a = W_INF; b = W_INF; #1;
    expect_true(b_op == W_ZERO && d == W_NAN, "inf - inf");
    op = OP_LNS_ADD; a = {1'b1, 8'hFF, 23'd0}; b = W_ONE; #1;
    expect_true(b_op == W_ZERO && d == a, "-inf + 1");
    op = OP_LNS_TO_FLP; a = W_ZERO; #1;
    expect_true(b_op == W_ZERO && c_op == W_ONE, "l2f zero");
    op = OP_LNS_TO_FLP; a = W_INF; #1;
    expect_true(b_op == W_INF && c_op == W_ONE, "l2f inf");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
