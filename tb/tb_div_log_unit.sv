// tb_div_log_unit: self-checking testbench of the division/logarithm unit.
// Each operation is pushed through the three register stages one enable per cycle.
// FLP division is compared with the double-precision quotient (within 1 ULP);
// FLP-to-LNS and the LNS add/sub back end (z = d + log2 X) are compared with
// log2 in double precision (within 1 LSB of the 23-bit fraction).  Special values and
// the three-stage latency are checked as well.
module tb_div_log_unit;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  logic  clk = 1'b0;
  logic  rst, en1, en2, en3, fdiv, to_lns;
  word_t a, x, d, result;
  int    checks = 0, failures = 0;

  div_log_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic f, input logic t, input word_t ia, ix, id);
    fdiv = f; to_lns = t; a = ia; x = ix; d = id;
    en1 = 1; @(posedge clk); #1 en1 = 0;
    en2 = 1; @(posedge clk); #1 en2 = 0;
    en3 = 1; @(posedge clk); #1 en3 = 0;
  endtask

  task automatic expect_true(input logic cond, input string what, input real info);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%h x=%h d=%h got=%h info=%g", what, a, x, d, result, info);
    end
  endtask

  real   q, zref, err;
  word_t prev;

  initial begin
    rst = 1; en1 = 0; en2 = 0; en3 = 0; fdiv = 0; to_lns = 0;
    a = W_ZERO; x = W_ZERO; d = W_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // FLP division
    for (int i = 0; i < 3000; i++) begin
      word_t ra, rx;
      ra = rand_flp(70, 180);
      rx = rand_flp(70, 180);
      if (i < 512) rx.fr = {9'(i), 14'($urandom)};
      run(1, 0, ra, rx, W_ZERO);
      q   = flp2real(ra) / flp2real(rx);
      err = ulp_err(flp2real(result), q);
      expect_true(err <= 1.0, "div", err);
    end

    // FLP-to-LNS
    for (int i = 0; i < 3000; i++) begin
      word_t rx;
      rx = rand_flp(1, 254);
      if (i < 512) rx.fr = {9'(i), 14'($urandom)};
      if (i % 11 == 0) rx.fr = 23'd0;
      run(0, 1, W_ONE, rx, W_ZERO);
      zref = real'(rx.ex) + $ln(1.0 + real'(rx.fr) / 8388608.0) / $ln(2.0);
      err  = (real'(result[30:0]) / 8388608.0 - zref) * 8388608.0;
      expect_true(result.sign == rx.sign && err <= 1.0 && err >= -1.0, "f2l", err);
    end

    // LNS add/sub back end: z = d + log2(X), X in (0, 2]
    for (int i = 0; i < 3000; i++) begin
      word_t rx, rd;
      rx = {1'b0, 8'(100 + $urandom % 28), 23'($urandom)};
      if (i % 3 == 0) rx.ex = 8'd127;
      rd = {1'($urandom), 8'(40 + $urandom % 170), 23'($urandom)};
      run(0, 0, W_ONE, rx, rd);
      zref = lns2log(rd) + 127.0 + $ln(flp2real(rx)) / $ln(2.0);
      err  = (real'(result[30:0]) / 8388608.0 - zref) * 8388608.0;
      expect_true(result.sign == rd.sign && err <= 1.0 && err >= -1.0, "lns back end", err);
    end

    // X = 1.0 exactly must return d unchanged
    for (int i = 0; i < 200; i++) begin
      word_t rd;
      rd = {1'($urandom), 8'(40 + $urandom % 170), 23'($urandom)};
      run(0, 0, W_ONE, W_ONE, rd);
      expect_true(result == rd, "d + log2(1)", 0.0);
    end

    // specials
    run(1, 0, W_ONE, W_ZERO, W_ZERO);  expect_true(result == W_INF, "1/0", 0.0);
    run(1, 0, W_ZERO, W_ZERO, W_ZERO); expect_true(result == W_NAN, "0/0", 0.0);
    run(1, 0, W_ONE, W_INF, W_ZERO);   expect_true(result == W_ZERO, "1/inf", 0.0);
    run(1, 0, {1'b0, 8'd250, 23'd0}, {1'b0, 8'd2, 23'd0}, W_ZERO);
    expect_true(result == W_INF, "quotient overflow", 0.0);
    run(0, 1, W_ONE, W_ZERO, W_ZERO);  expect_true(result == W_ZERO, "f2l 0", 0.0);
    run(0, 1, W_ONE, W_INF, W_ZERO);   expect_true(result == W_INF, "f2l inf", 0.0);
    run(0, 0, W_ONE, W_ZERO, {1'b1, 8'd130, 23'd7});
    expect_true(result == {1'b1, 8'd0, 23'd0}, "cancellation to zero", 0.0);
    run(0, 0, W_ONE, {1'b0, 8'd100, 23'd0}, {1'b0, 8'd10, 23'd7});
    expect_true(result[30:23] == 8'd0, "LNS underflow to zero", 0.0);
    run(0, 0, W_ONE, W_ONE, W_NAN);    expect_true(result == W_NAN, "d NaN passes", 0.0);

    // latency: nothing visible before the third enabled stage
    prev = result;
    fdiv = 1; to_lns = 0; a = {1'b0, 8'd128, 23'd0}; x = W_ONE; d = W_ZERO;
    en1 = 1; @(posedge clk); #1 en1 = 0;
    en2 = 1; @(posedge clk); #1 en2 = 0;
    expect_true(result == prev, "no early result", 0.0);
    en3 = 1; @(posedge clk); #1 en3 = 0;
    expect_true(result == {1'b0, 8'd128, 23'd0}, "2/1 after 3 stages", 0.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
