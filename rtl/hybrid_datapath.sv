// hybrid_datapath: registers, operand multiplexers and the three arithmetic units of
// the hybrid FLP/LNS processor.
//
// Part one (MAF side): the control word register and R1..R3 are loaded from the input
// stream.  The A, B, C registers feed the multiply-add-fused unit (B*C +/- A).  For the
// FLP MAF instructions they take R1, R2, R3.  For LNS add/sub and LNS-to-FLP, B and C
// (with their 24-bit low-order extensions) come from the exponential unit, which reads
// R1 and R2, and A is 1.0 (LNS add/sub) or 0.0 (LNS-to-FLP).  The d register keeps the
// exponential unit's d output.  A, B, C load in every Read and Exp cycle (Read_Exp),
// d in Exp.
// Part two (division side): the dividend of the division/logarithm unit is R1 for
// FLP-DIV and 1.0 otherwise; the divisor is R1 (FLP-to-LNS), R2 (FLP-DIV) or the MAF
// result (LNS add/sub); d is the d register for LNS add/sub and 0.0 otherwise.  The
// final multiplexer returns the MAF result for FLP MAF and LNS-to-FLP and the
// division/logarithm result for the others.
// The multiplexers and load strobes follow the document's datapath diagrams.  Keeping
// the low-order parts mBp2/mCp2 in registers next to B and C, gating d to 0.0 outside
// LNS add/sub and returning NaN for a reserved opcode are this design's choices.
//
// Timing: all registers are loaded by the strobes in `ctrl`; the MAF and
// division/logarithm units are three-stage pipelines advanced by the MAFn/DIVn strobes.
module hybrid_datapath
  import hyb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  ctrl_t   ctrl,
  input  word_t   fsl_s_data,
  output opcode_t op,
  output word_t   final_result
);

  word_t       r1, r2, r3, a_reg, b_reg, c_reg, d_reg;
  logic [23:0] mbp2_reg, mcp2_reg;
  opcode_t     cw_op;

  word_t       exp_b, exp_c, exp_d;
  logic [23:0] exp_mbp2, exp_mcp2;
  word_t       result_maf, result_div;
  word_t       div_a, div_x, div_d;

  logic flp_maf_op, lns_as, read_exp;

  assign op         = cw_op;
  assign flp_maf_op = (cw_op == OP_FLP_MAF_ADD) || (cw_op == OP_FLP_MAF_SUB);
  assign lns_as     = (cw_op == OP_LNS_ADD) || (cw_op == OP_LNS_SUB);
  assign read_exp   = ctrl.read_st || ctrl.exp_st;

  // control word and operand registers
  always_ff @(posedge clk) begin
    if (rst) begin
      cw_op <= OP_FLP_MAF_ADD;
      r1    <= W_ZERO;
      r2    <= W_ZERO;
      r3    <= W_ZERO;
    end else begin
      if (ctrl.read_cntl_st) cw_op <= opcode_t'(fsl_s_data[2:0]);
      if (ctrl.read1_st)     r1    <= fsl_s_data;
      if (ctrl.read2_st)     r2    <= fsl_s_data;
      if (ctrl.read3_st)     r3    <= fsl_s_data;
    end
  end

  exp_unit u_exp (
    .op   (cw_op),
    .a    (r1),
    .b    (r2),
    .b_op (exp_b),
    .mbp2 (exp_mbp2),
    .c_op (exp_c),
    .mcp2 (exp_mcp2),
    .d    (exp_d)
  );

  // A, B, C and d registers
  always_ff @(posedge clk) begin
    if (rst) begin
      a_reg    <= W_ZERO;
      b_reg    <= W_ZERO;
      c_reg    <= W_ZERO;
      mbp2_reg <= '0;
      mcp2_reg <= '0;
      d_reg    <= W_ZERO;
    end else begin
      if (read_exp) begin
        a_reg    <= flp_maf_op ? r1 : (lns_as ? W_ONE : W_ZERO);
        b_reg    <= flp_maf_op ? r2 : exp_b;
        c_reg    <= flp_maf_op ? r3 : exp_c;
        mbp2_reg <= flp_maf_op ? 24'd0 : exp_mbp2;
        mcp2_reg <= flp_maf_op ? 24'd0 : exp_mcp2;
      end
      if (ctrl.exp_st) d_reg <= exp_d;
    end
  end

  flp_maf u_maf (
    .clk    (clk),
    .rst    (rst),
    .en1    (ctrl.maf1_st),
    .en2    (ctrl.maf2_st),
    .en3    (ctrl.maf3_st),
    .a      (a_reg),
    .b      (b_reg),
    .c      (c_reg),
    .mbp2   (mbp2_reg),
    .mcp2   (mcp2_reg),
    .sub    (cw_op == OP_FLP_MAF_SUB),
    .result (result_maf)
  );

  // operand multiplexers of the division/logarithm unit
  always_comb begin
    div_a = (cw_op == OP_FLP_DIV) ? r1 : W_ONE;
    unique case (cw_op)
      OP_FLP_TO_LNS: div_x = r1;
      OP_FLP_DIV:    div_x = r2;
      default:       div_x = result_maf;
    endcase
    div_d = lns_as ? d_reg : W_ZERO;
  end

  div_log_unit u_div (
    .clk    (clk),
    .rst    (rst),
    .en1    (ctrl.div1_st),
    .en2    (ctrl.div2_st),
    .en3    (ctrl.div3_st),
    .fdiv   (cw_op == OP_FLP_DIV),
    .to_lns (cw_op == OP_FLP_TO_LNS),
    .a      (div_a),
    .x      (div_x),
    .d      (div_d),
    .result (result_div)
  );

  // final result multiplexer
  always_comb begin
    if (cw_op == OP_RESERVED)                         final_result = W_NAN;
    else if (flp_maf_op || cw_op == OP_LNS_TO_FLP)    final_result = result_maf;
    else                                              final_result = result_div;
  end

endmodule
