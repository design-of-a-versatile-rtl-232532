// tb_hybrid_processor: end-to-end testbench of the hybrid FLP/LNS processor at its
// default parameters.
//
// A model host sends control words and operands over the input stream and collects
// results from the output stream, for all seven instructions, with random gaps on the
// input (exists low) and random back-pressure on the output (full high).  Results are
// compared with double-precision references (tb_util_pkg::op_error): FLP MAF and
// LNS-to-FLP within 0.5 ULP, FLP division within 1 ULP, FLP-to-LNS within 1 LSB of the
// logarithm fraction, LNS add/sub within 1.44 LSB (a relative error of the value below
// 2^-23).  The number of datapath cycles
// between the end of the read phase and the write is checked against the instruction
// (3, 3, 3, 4, 7).  Each mechanism of the design is counted and must occur at least
// once: every instruction, input stall, output back-pressure, LNS effective addition
// and subtraction, exact LNS cancellation to zero, 2^-v below the precision (v > 127),
// special operands, and FLP MAF with cancellation.
module tb_hybrid_processor;
  import hyb_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] fsl_s_data, fsl_m_data;
  logic        fsl_s_exists, fsl_s_read, fsl_m_write, fsl_m_full, busy;
  int          checks = 0, failures = 0;

  hybrid_processor dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired, state %0d", dut.u_ctrl.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_op [8];
  int n_in_stall, n_out_stall, n_eff_add, n_eff_sub, n_cancel, n_tiny, n_special, n_maf_cancel;
  real max_err [8];

  // host: send one instruction, receive its result
  task automatic exec(input opcode_t op, input logic [31:0] r1, r2, r3,
                      input logic stall_in, input logic stall_out,
                      output logic [31:0] res, output int dp_cycles);
    logic [31:0] words [4];
    int nw, sent, last_pop, wr_cycle;
    logic stalled;
    words[0] = {29'd0, 3'(op)};
    words[1] = r1; words[2] = r2; words[3] = r3;
    nw = 1 + int'(operand_count(op));
    sent = 0; stalled = 0;
    last_pop = 0;
    while (sent < nw) begin
      fsl_s_data   = words[sent];
      fsl_s_exists = !(stall_in && ($urandom % 3 == 0));
      if (!fsl_s_exists && sent > 0) stalled = 1;
      #1;
      if (fsl_s_read) begin
        sent++;
        last_pop = cycle;
      end
      @(posedge clk);
      #1;
    end
    fsl_s_exists = 1'b0;
    if (stalled) n_in_stall++;
    fsl_m_full = stall_out;
    while (!busy || !dut.u_ctrl.ctrl.write_st) begin @(posedge clk); #1; end
    if (stall_out) begin
      repeat (2 + $urandom % 3) begin
        @(posedge clk);
        #1;
        checks++;
        if (fsl_m_write) begin failures++; $display("FAIL write while full"); end
      end
      n_out_stall++;
      fsl_m_full = 1'b0;
    end
    #1;
    while (!fsl_m_write) begin @(posedge clk); #1; end
    res = fsl_m_data;
    wr_cycle = cycle;
    @(posedge clk);
    #1;
    dp_cycles = wr_cycle - last_pop - 2;
  endtask

  task automatic do_op(input opcode_t op, input logic [31:0] r1, r2, r3, input real tol);
    logic [31:0] res;
    int dpc, exp_c;
    real e;
    logic so;
    so = ($urandom % 4 == 0);
    exec(op, r1, r2, r3, ($urandom % 2 == 0), so, res, dpc);
    n_op[op]++;
    e = op_error(3'(op), r1, r2, r3, res);
    checks++;
    if (e != -1.0 && abs_r(e) > tol) begin
      failures++;
      $display("FAIL op %0d: r1=%h r2=%h r3=%h got=%h err=%g", op, r1, r2, r3, res, e);
    end
    if (e != -1.0 && abs_r(e) > max_err[op]) max_err[op] = abs_r(e);
    case (op)
      OP_LNS_TO_FLP:              exp_c = 4;
      OP_LNS_ADD, OP_LNS_SUB:     exp_c = 7;
      default:                    exp_c = 3;
    endcase
    if (!so) begin
      checks++;
      if (dpc != exp_c) begin
        failures++;
        $display("FAIL cycles op %0d: %0d, expected %0d", op, dpc, exp_c);
      end
    end
  endtask

  task automatic do_special(input opcode_t op, input logic [31:0] r1, r2, r3,
                            input logic [31:0] expected);
    logic [31:0] res;
    int dpc;
    exec(op, r1, r2, r3, 1'b0, 1'b0, res, dpc);
    n_special++;
    n_op[op]++;
    checks++;
    if (res !== expected) begin
      failures++;
      $display("FAIL special op %0d: r1=%h r2=%h got=%h expected=%h", op, r1, r2, res, expected);
    end
  endtask

  function automatic logic [31:0] rand_lns(int imin, int imax);
    return {1'($urandom), 8'(imin + int'($urandom % (imax - imin + 1))), 23'($urandom)};
  endfunction

  initial begin
    logic [31:0] x, y, z;
    rst = 1; fsl_s_exists = 0; fsl_s_data = '0; fsl_m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    for (int i = 0; i < 300; i++) begin
      // FLP multiply-add / multiply-subtract
      x = rand_flp(100, 150); y = rand_flp(100, 150); z = rand_flp(90, 170);
      if (i % 5 == 0) begin
        z = {y[31] ^ x[31], 8'(int'(x[30:23]) + int'(y[30:23]) - 127), x[22:0]};
        n_maf_cancel++;
      end
      do_op((i % 2 == 1) ? OP_FLP_MAF_SUB : OP_FLP_MAF_ADD, z, x, y, 0.5001);
      // FLP division
      do_op(OP_FLP_DIV, rand_flp(70, 180), rand_flp(70, 180), 32'd0, 1.0);
      // conversions
      do_op(OP_FLP_TO_LNS, rand_flp(1, 254), 32'd0, 32'd0, 1.0);
      do_op(OP_LNS_TO_FLP, rand_lns(1, 254), 32'd0, 32'd0, 0.5001);
      // LNS add / sub with v spread from 2^-10 to beyond 30
      x = rand_lns(40, 210);
      y = x;
      y[31] = 1'($urandom);
      case (i % 3)
        0: y[30:0] = x[30:0] - 31'(8192 + $urandom % 8388608);
        1: y[30:0] = x[30:0] + 31'(8192 + $urandom % (8 * 8388608));
        default: y[30:0] = {8'(40 + $urandom % 170), 23'($urandom)};
      endcase
      if (x[31] == (y[31] ^ (i % 2 == 1))) n_eff_add++; else n_eff_sub++;
      do_op((i % 2 == 1) ? OP_LNS_SUB : OP_LNS_ADD, x, y, 32'd0, 1.44);
    end

    // exact cancellation in LNS subtraction, 2^-v below precision, special operands
    x = rand_lns(40, 210);
    do_special(OP_LNS_SUB, x, x, 32'd0, {x[31], 31'd0});   n_cancel++;
    do_special(OP_LNS_ADD, {1'b0, 8'd200, 23'd3}, {1'b0, 8'd10, 23'd3}, 32'd0,
               {1'b0, 8'd200, 23'd3});                      n_tiny++;
    do_special(OP_LNS_ADD, W_ZERO, {1'b1, 8'd90, 23'd1}, 32'd0, {1'b1, 8'd90, 23'd1});
    do_special(OP_LNS_SUB, W_INF, W_INF, 32'd0, W_NAN);
    do_special(OP_FLP_DIV, W_ONE, W_ZERO, 32'd0, W_INF);
    do_special(OP_FLP_TO_LNS, W_ZERO, 32'd0, 32'd0, W_ZERO);
    do_special(OP_LNS_TO_FLP, W_INF, 32'd0, 32'd0, W_INF);
    do_special(OP_FLP_MAF_ADD, W_ONE, W_INF, W_ZERO, W_NAN);

    // every mechanism must have happened
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never ran", k); end
      $display("opcode %0d: %0d runs, max error %g", k, n_op[k], max_err[k]);
    end
    checks++; if (n_in_stall == 0)   begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_out_stall == 0)  begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_eff_add == 0)    begin failures++; $display("FAIL no LNS effective add"); end
    checks++; if (n_eff_sub == 0)    begin failures++; $display("FAIL no LNS effective sub"); end
    checks++; if (n_cancel == 0)     begin failures++; $display("FAIL no cancellation"); end
    checks++; if (n_tiny == 0)       begin failures++; $display("FAIL no v > 127 case"); end
    checks++; if (n_special == 0)    begin failures++; $display("FAIL no special operands"); end
    checks++; if (n_maf_cancel == 0) begin failures++; $display("FAIL no MAF cancellation"); end
    $display("input stalls %0d, output stalls %0d, LNS eff add %0d, eff sub %0d, specials %0d",
             n_in_stall, n_out_stall, n_eff_add, n_eff_sub, n_special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
