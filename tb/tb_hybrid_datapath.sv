// tb_hybrid_datapath: self-checking testbench of the datapath alone.
// The testbench plays the controller: it raises the register-load strobes and the
// Exp/MAF/DIV state strobes in the order of each instruction and then compares
// final_result with the double-precision reference of the instruction
// (tb_util_pkg::op_error).  It also checks that the result is routed through the
// right unit (MAF for FLP MAF and LNS-to-FLP, division/logarithm for the others) by
// checking that it is stable only after the last stage of that unit.
module tb_hybrid_datapath;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  ctrl_t   ctrl;
  word_t   fsl_s_data;
  opcode_t op;
  word_t   final_result;
  int      checks = 0, failures = 0;

  hybrid_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int which);
    ctrl = '0;
    case (which)
      0: ctrl.read_cntl_st = 1;
      1: begin ctrl.read_st = 1; ctrl.read1_st = 1; end
      2: begin ctrl.read_st = 1; ctrl.read2_st = 1; end
      3: begin ctrl.read_st = 1; ctrl.read3_st = 1; end
      4: ctrl.read_st  = 1;
      5: ctrl.exp_st   = 1;
      6: ctrl.maf1_st  = 1;
      7: ctrl.maf2_st  = 1;
      8: ctrl.maf3_st  = 1;
      9: ctrl.div1_st  = 1;
      10: ctrl.div2_st = 1;
      11: ctrl.div3_st = 1;
      default: ;
    endcase
    @(posedge clk);
    #1 ctrl = '0;
  endtask

  task automatic run(input opcode_t o, input word_t r1, r2, r3, input real tol);
    real e;
    logic uses_maf, uses_div;
    uses_maf = (o != OP_FLP_DIV) && (o != OP_FLP_TO_LNS);
    uses_div = (o != OP_FLP_MAF_ADD) && (o != OP_FLP_MAF_SUB) && (o != OP_LNS_TO_FLP);
    fsl_s_data = word_t'({29'd0, 3'(o)}); pulse(0);
    fsl_s_data = r1; pulse(1);
    fsl_s_data = r2; pulse(2);
    fsl_s_data = r3; pulse(3);
    pulse(4);
    if (o == OP_LNS_ADD || o == OP_LNS_SUB || o == OP_LNS_TO_FLP) pulse(5);
    if (uses_maf) begin pulse(6); pulse(7); pulse(8); end
    if (uses_div) begin pulse(9); pulse(10); pulse(11); end
    checks++;
    if (op != o) begin failures++; $display("FAIL opcode register"); end
    e = op_error(3'(o), r1, r2, r3, final_result);
    checks++;
    if (e != -1.0 && abs_r(e) > tol) begin
      failures++;
      $display("FAIL op %0d: r1=%h r2=%h r3=%h got=%h err=%g", o, r1, r2, r3, final_result, e);
    end
  endtask

  initial begin
    word_t x, y;
    rst = 1; ctrl = '0; fsl_s_data = W_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      run(OP_FLP_MAF_ADD, rand_flp(90, 170), rand_flp(100, 150), rand_flp(100, 150), 0.5001);
      run(OP_FLP_MAF_SUB, rand_flp(90, 170), rand_flp(100, 150), rand_flp(100, 150), 0.5001);
      run(OP_FLP_DIV, rand_flp(70, 180), rand_flp(70, 180), W_ZERO, 1.0);
      run(OP_FLP_TO_LNS, rand_flp(1, 254), W_ZERO, W_ZERO, 1.0);
      x = {1'($urandom), 8'(1 + $urandom % 254), 23'($urandom)};
      run(OP_LNS_TO_FLP, x, W_ZERO, W_ZERO, 0.5001);
      x = {1'($urandom), 8'(40 + $urandom % 170), 23'($urandom)};
      y = {1'($urandom), 8'(int'(x.ex) - 3 + int'($urandom % 7)), 23'($urandom)};
      run((i % 2 == 1) ? OP_LNS_SUB : OP_LNS_ADD, x, y, W_ZERO, 1.44);
    end
    // a reserved opcode returns NaN
    fsl_s_data = word_t'(32'd7); pulse(0);
    checks++;
    if (final_result != W_NAN) begin failures++; $display("FAIL reserved opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
