// control_unit: finite-state machine that sequences one instruction of the hybrid
// FLP/LNS processor.
//
// States and paths (from the document's controller diagram):
//   Idle  -> Read when a word is waiting on the input stream (Data_Ready)
//   Read  stays while words remain to be read (Read_number > 0), then goes to
//           Exp  for LNS-Add, LNS-Sub, LNS-to-FLP
//           MAF1 for FLP-MAF-Add, FLP-MAF-Sub
//           DIV1 for FLP-DIV, FLP-to-LNS
//   Exp -> MAF1 -> MAF2 -> MAF3 -> Write (MAF and LNS-to-FLP) or DIV1 (LNS add/sub)
//   DIV1 -> DIV2 -> DIV3 -> Write -> Idle
// Each state drives a strobe named after it (ctrl.<state>_st).  This gives the
// datapath cycle counts of the document: LNS-to-FLP 4, FLP-to-LNS 3, LNS add/sub 7,
// FLP MAF 3, FLP DIV 3 (Exp, MAF and DIV states only).
//
// Read handshake (this design's choice; the document names the stream but not its
// protocol): the input is a first-word-fall-through stream (data, exists, read).
// In Read a word is popped in each cycle in which `fsl_s_exists` is high and words
// remain.  The first word is the control word; its opcode sets Read_number to the
// number of operands (3 for MAF, 2 for DIV and LNS add/sub, 1 for conversions), which
// go to R1, R2, R3 in order.  Read is left one cycle after the last pop, so the A, B,
// C registers, loaded in every Read and Exp cycle, see the final R1..R3.  In Write the
// result is pushed when `fsl_m_full` is low.  A reserved opcode reads one operand and
// goes straight to Write.
//
// Assertions check the stream handshake rules (no pop without a word, no push while
// full) and that the state strobes are one-hot.
module control_unit
  import hyb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       fsl_s_exists,   // Data_Ready
  input  logic [2:0] fsl_s_op,       // opcode field of the word on the input stream
  input  opcode_t    op,             // opcode held in the control word register
  input  logic       fsl_m_full,
  output logic       fsl_s_read,
  output logic       fsl_m_write,
  output ctrl_t      ctrl,
  output logic       busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_READ, S_EXP, S_MAF1, S_MAF2, S_MAF3, S_DIV1, S_DIV2, S_DIV3, S_WRITE
  } state_t;

  state_t     state, next;
  logic [1:0] widx;          // 0: control word, 1..3: R1..R3
  logic [2:0] read_number;   // words still to be read
  logic       pop;

  assign pop = (state == S_READ) && (read_number != 3'd0) && fsl_s_exists;

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:  if (fsl_s_exists) next = S_READ;
      S_READ:
        if (read_number == 3'd0) begin
          unique case (op)
            OP_LNS_ADD, OP_LNS_SUB, OP_LNS_TO_FLP: next = S_EXP;
            OP_FLP_MAF_ADD, OP_FLP_MAF_SUB:        next = S_MAF1;
            OP_FLP_DIV, OP_FLP_TO_LNS:             next = S_DIV1;
            default:                               next = S_WRITE;
          endcase
        end
      S_EXP:   next = S_MAF1;
      S_MAF1:  next = S_MAF2;
      S_MAF2:  next = S_MAF3;
      S_MAF3:  next = (op == OP_LNS_ADD || op == OP_LNS_SUB) ? S_DIV1 : S_WRITE;
      S_DIV1:  next = S_DIV2;
      S_DIV2:  next = S_DIV3;
      S_DIV3:  next = S_WRITE;
      S_WRITE: if (!fsl_m_full) next = S_IDLE;
      default: next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      widx        <= 2'd0;
      read_number <= 3'd0;
    end else begin
      state <= next;
      if (state == S_IDLE && fsl_s_exists) begin
        widx        <= 2'd0;
        read_number <= 3'd1;
      end else if (pop) begin
        widx        <= widx + 2'd1;
        read_number <= (widx == 2'd0) ? {1'b0, operand_count(opcode_t'(fsl_s_op))}
                                      : read_number - 3'd1;
      end
    end
  end

  always_comb begin
    ctrl              = '0;
    ctrl.read_st      = (state == S_READ);
    ctrl.read_cntl_st = pop && (widx == 2'd0);
    ctrl.read1_st     = pop && (widx == 2'd1);
    ctrl.read2_st     = pop && (widx == 2'd2);
    ctrl.read3_st     = pop && (widx == 2'd3);
    ctrl.exp_st       = (state == S_EXP);
    ctrl.maf1_st      = (state == S_MAF1);
    ctrl.maf2_st      = (state == S_MAF2);
    ctrl.maf3_st      = (state == S_MAF3);
    ctrl.div1_st      = (state == S_DIV1);
    ctrl.div2_st      = (state == S_DIV2);
    ctrl.div3_st      = (state == S_DIV3);
    ctrl.write_st     = (state == S_WRITE);
  end

  assign fsl_s_read  = pop;
  assign fsl_m_write = (state == S_WRITE) && !fsl_m_full;
  assign busy        = (state != S_IDLE);

  // stream handshake rules: a word is only popped when one is offered, a result is only
  // pushed when there is room, and at most one state strobe is active
  a_pop_needs_word: assert property (@(posedge clk) disable iff (rst) fsl_s_read |-> fsl_s_exists);
  a_push_needs_room: assert property (@(posedge clk) disable iff (rst) fsl_m_write |-> !fsl_m_full);
  a_one_state: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.exp_st, ctrl.maf1_st, ctrl.maf2_st, ctrl.maf3_st, ctrl.div1_st,
              ctrl.div2_st, ctrl.div3_st, ctrl.write_st, ctrl.read_st}));

endmodule
