// tb_control_unit: self-checking testbench of the controller FSM.
// For every instruction a model host offers a control word and the operands on the
// input stream (with gaps where `exists` is low) and accepts the result (with
// `full` asserted for a while).  The testbench checks the order of the register-load
// strobes, the path through Exp/MAF/DIV states, the number of datapath cycles
// (LNS-to-FLP 4, FLP-to-LNS 3, LNS add/sub 7, FLP MAF 3, FLP DIV 3), that no word is
// popped outside Read and that exactly one result is pushed.
module tb_control_unit;
  import hyb_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       fsl_s_exists, fsl_m_full, fsl_s_read, fsl_m_write, busy;
  logic [2:0] fsl_s_op;
  opcode_t    op;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (op %0d)", what, got, exp_v, op);
    end
  endtask

  // control word register model: the TB plays the datapath's register
  always_ff @(posedge clk) if (ctrl.read_cntl_st) op <= opcode_t'(fsl_s_op);

  int n_exp, n_maf1, n_maf2, n_maf3, n_div1, n_div2, n_div3, n_pop, n_push;
  int n_load [4];
  int order_err;
  int next_word;

  always_ff @(posedge clk) begin
    if (!rst) begin
      n_exp  <= n_exp  + int'(ctrl.exp_st);
      n_maf1 <= n_maf1 + int'(ctrl.maf1_st);
      n_maf2 <= n_maf2 + int'(ctrl.maf2_st);
      n_maf3 <= n_maf3 + int'(ctrl.maf3_st);
      n_div1 <= n_div1 + int'(ctrl.div1_st);
      n_div2 <= n_div2 + int'(ctrl.div2_st);
      n_div3 <= n_div3 + int'(ctrl.div3_st);
      n_pop  <= n_pop  + int'(fsl_s_read);
      n_push <= n_push + int'(fsl_m_write);
      if (fsl_s_read && !fsl_s_exists) order_err <= order_err + 1;
      if (fsl_s_read && !ctrl.read_st) order_err <= order_err + 1;
      // the k-th popped word must go to CW, R1, R2, R3 in that order
      if (fsl_s_read) begin
        next_word <= next_word + 1;
        if (next_word == 0 && !ctrl.read_cntl_st) order_err <= order_err + 1;
        if (next_word == 1 && !ctrl.read1_st)     order_err <= order_err + 1;
        if (next_word == 2 && !ctrl.read2_st)     order_err <= order_err + 1;
        if (next_word == 3 && !ctrl.read3_st)     order_err <= order_err + 1;
      end
      // MAF states must run in order
      if (ctrl.maf2_st && n_maf1 <= n_maf2) order_err <= order_err + 1;
      if (ctrl.div2_st && n_div1 <= n_div2) order_err <= order_err + 1;
    end
  end

  task automatic run_op(input opcode_t o, input int nops, input int n_e, input int n_m,
                        input int n_d);
    int first_dp, last_dp, cyc, words;
    n_exp = 0; n_maf1 = 0; n_maf2 = 0; n_maf3 = 0; n_div1 = 0; n_div2 = 0; n_div3 = 0;
    n_pop = 0; n_push = 0; order_err = 0; next_word = 0;
    first_dp = -1; last_dp = -1; cyc = 0; words = 0;
    fsl_s_op = 3'(o);
    fsl_m_full = 1'b1;
    // offer words, with a one-cycle gap after the control word
    while (!(ctrl.write_st) || cyc < 3) begin
      fsl_s_exists = (words < nops + 1) && !(words == 1 && cyc[0]);
      @(posedge clk);
      if (fsl_s_read) words++;
      #1;
      cyc++;
      if (ctrl.exp_st || ctrl.maf1_st || ctrl.maf2_st || ctrl.maf3_st ||
          ctrl.div1_st || ctrl.div2_st || ctrl.div3_st) begin
        if (first_dp < 0) first_dp = cyc;
        last_dp = cyc;
      end
      if (cyc > 100) break;
    end
    fsl_s_exists = 1'b0;
    // hold the output full for three cycles, then accept
    repeat (3) begin
      @(posedge clk); #1;
      expect_eq(int'(ctrl.write_st), 1, "Write waits while full");
    end
    fsl_m_full = 1'b0;
    @(posedge clk); #1;
    expect_eq(int'(busy), 0, "back to Idle after Write");
    expect_eq(words, nops + 1, "words read");
    expect_eq(n_pop, nops + 1, "pops");
    expect_eq(n_push, 1, "one result pushed");
    expect_eq(n_exp, n_e, "Exp cycles");
    expect_eq(n_maf1 + n_maf2 + n_maf3, 3 * n_m, "MAF cycles");
    expect_eq(n_div1 + n_div2 + n_div3, 3 * n_d, "DIV cycles");
    expect_eq(last_dp - first_dp + 1, n_e + 3 * n_m + 3 * n_d, "datapath cycles per instruction");
    expect_eq(order_err, 0, "strobe order");
  endtask

  initial begin
    rst = 1; fsl_s_exists = 0; fsl_m_full = 0; fsl_s_op = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    //        opcode          operands Exp MAF DIV
    run_op(OP_LNS_TO_FLP,     1,       1,  1,  0);   // 4 cycles
    run_op(OP_FLP_TO_LNS,     1,       0,  0,  1);   // 3 cycles
    run_op(OP_LNS_ADD,        2,       1,  1,  1);   // 7 cycles
    run_op(OP_LNS_SUB,        2,       1,  1,  1);   // 7 cycles
    run_op(OP_FLP_MAF_ADD,    3,       0,  1,  0);   // 3 cycles
    run_op(OP_FLP_MAF_SUB,    3,       0,  1,  0);   // 3 cycles
    run_op(OP_FLP_DIV,        2,       0,  0,  1);   // 3 cycles
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
