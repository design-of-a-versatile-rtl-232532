// tb_flp_maf: self-checking testbench of the multiply-add-fused unit.
// Drives random and directed operands through the three register stages (one stage
// enable per cycle, as the controller does) and compares B*C +/- A with a double
// precision reference: at most 0.5 ULP (+ reference slack) for normal cases, exact
// special values otherwise.  Extended operands (mbp2, mcp2) are checked on
// 1 - 2^-v style cancellations where the extra precision matters.  The result must
// appear after exactly three enabled stages.
module tb_flp_maf;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        en1, en2, en3, sub;
  word_t       a, b, c, result;
  logic [23:0] mbp2, mcp2;
  int          checks = 0, failures = 0;

  flp_maf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input word_t ia, ib, ic, input logic [23:0] xb, xc, input logic s);
    a = ia; b = ib; c = ic; mbp2 = xb; mcp2 = xc; sub = s;
    en1 = 1; @(posedge clk); #1 en1 = 0;
    en2 = 1; @(posedge clk); #1 en2 = 0;
    en3 = 1; @(posedge clk); #1 en3 = 0;
  endtask

  task automatic check_val(input real ref_v, input real tol, input string what);
    real err;
    checks++;
    err = ulp_err(flp2real(result), ref_v);
    if (err > tol) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h mbp2=%h mcp2=%h got=%h (%g) ref=%g err=%g ulp",
               what, a, b, c, mbp2, mcp2, result, flp2real(result), ref_v, err);
    end
  endtask

  task automatic check_word(input word_t exp_w, input string what);
    checks++;
    if (result !== exp_w) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h got=%h exp=%h", what, a, b, c, result, exp_w);
    end
  endtask

  real mb, mc, r;
  word_t prev;

  initial begin
    rst = 1; en1 = 0; en2 = 0; en3 = 0; sub = 0;
    a = W_ZERO; b = W_ZERO; c = W_ZERO; mbp2 = 0; mcp2 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // random FLP multiply-add / multiply-sub, exponents close enough to interact
    for (int i = 0; i < 3000; i++) begin
      word_t ra, rb, rc;
      logic  s;
      rb = rand_flp(100, 150);
      rc = rand_flp(100, 150);
      ra = rand_flp(80 + int'($urandom % 40), 170);
      s  = 1'($urandom);
      if (i % 7 == 0) ra = {~(rb[31] ^ rc[31] ^ s), 8'(int'(rb[30:23]) + int'(rc[30:23]) - 127), rb[22:0]};
      run(ra, rb, rc, 24'd0, 24'd0, s);
      r = flp2real(rb) * flp2real(rc) + (s ? -flp2real(ra) : flp2real(ra));
      if (r == 0.0) check_word(W_ZERO, "exact cancel");
      else          check_val(r, 0.5001, "maf");
    end

    // extended-precision operands: 1 - M_B*M_C*2^-k with 47-bit M_B, M_C
    for (int i = 0; i < 2000; i++) begin
      word_t rb, rc;
      int    k;
      k  = int'($urandom % 12);
      rb = {1'b1, 8'(127 - k), 23'($urandom)};
      rc = {1'b0, 8'd127, 7'd0, 16'($urandom)};
      if (k == 0) rb[22:0] = {7'd0, 16'($urandom)} ;
      mbp2 = 24'($urandom);
      mcp2 = 24'($urandom);
      run(W_ONE, rb, rc, mbp2, mcp2, 1'b0);
      mb = 1.0 + real'(rb[22:0]) / 8388608.0 + real'(mbp2) / 140737488355328.0;
      mc = 1.0 + real'(rc[22:0]) / 8388608.0 + real'(mcp2) / 140737488355328.0;
      r  = 1.0 - mb * mc * $pow(2.0, -real'(k));
      if (r != 0.0 && (r > 1.0e-6 || r < -1.0e-6)) check_val(r, 0.501, "extended");
    end

    // specials
    run(W_ONE, W_INF, W_ZERO, 0, 0, 0);            check_word(W_NAN, "inf*0");
    run(W_INF, W_INF, W_ONE, 0, 0, 1);             check_word(W_NAN, "inf-inf");
    run(W_ONE, W_INF, W_ONE, 0, 0, 0);             check_word(W_INF, "inf+1");
    run(W_NAN, W_ONE, W_ONE, 0, 0, 0);             check_word(W_NAN, "nan");
    run(W_ZERO, W_ONE, W_ZERO, 0, 0, 0);           check_word(W_ZERO, "0*1+0");
    run({1'b0, 8'd200, 23'd0}, {1'b0, 8'd250, 23'd0}, {1'b0, 8'd250, 23'd0}, 0, 0, 0);
    check_word(W_INF, "overflow");
    run({1'b0, 8'd5, 23'd0}, {1'b0, 8'd10, 23'd0}, {1'b0, 8'd10, 23'd0}, 0, 0, 1);
    check_word({1'b1, 8'd5, 23'd0}, "underflow of product, -A");
    // A far above the product: result must equal A exactly (product only sticky)
    run({1'b0, 8'd180, 23'd0}, {1'b0, 8'd127, 23'd1}, {1'b0, 8'd100, 23'd5}, 0, 0, 1);
    check_word({1'b1, 8'd180, 23'd0}, "far A");

    // latency: result register changes only on the third enabled stage
    prev = result;
    a = W_ONE; b = W_ONE; c = W_ONE; sub = 0; mbp2 = 0; mcp2 = 0;
    en1 = 1; @(posedge clk); #1 en1 = 0;
    en2 = 1; @(posedge clk); #1 en2 = 0;
    checks++;
    if (result !== prev) begin failures++; $display("FAIL latency: early result"); end
    en3 = 1; @(posedge clk); #1 en3 = 0;
    check_word({1'b0, 8'd128, 23'd0}, "1*1+1 after 3 stages");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
