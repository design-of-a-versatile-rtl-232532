// hybrid_processor: 32-bit hybrid floating-point / logarithmic-number-system arithmetic
// processor.
//
// One datapath executes seven instructions: FLP multiply-add and multiply-subtract
// (B*C +/- A), FLP division, FLP-to-LNS and LNS-to-FLP conversion, and LNS addition and
// subtraction.  LNS add/sub reuses the FLP hardware: the exponential unit and the MAF
// compute X = 1 +/- 2^-|a-b|, and the division/logarithm unit computes
// z = max(a,b) + log2(X).  The conversions are the first and the second half of that
// path.  FLP and LNS words share one 32-bit layout (sign, 8-bit, 23-bit), see hyb_pkg.
//
// Interface: a host writes, on the FSL-style input stream (data/exists/read), a control
// word whose bits 2:0 are the opcode, then the operands in order R1, R2, R3:
//   FLP-MAF-Add/Sub  R1 = A, R2 = B, R3 = C, result B*C + A / B*C - A
//   FLP-DIV          R1 = dividend, R2 = divisor
//   FLP-to-LNS       R1 = FLP value;     LNS-to-FLP R1 = LNS value
//   LNS-Add/Sub      R1 = a, R2 = b,     result a + b / a - b in LNS
// and reads one result word from the output stream (data/write/full).
//
// Timing: after the read phase the datapath takes 3 cycles for FLP MAF, FLP DIV and
// FLP-to-LNS, 4 for LNS-to-FLP and 7 for LNS add/sub, then one Write cycle (longer if
// the output stream is full).  Reset is synchronous and active high.
module hybrid_processor
  import hyb_pkg::*;
#(
  parameter int WIDTH = 32     // word length; the datapath is built for 32 bits only
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] fsl_s_data,
  input  logic             fsl_s_exists,
  output logic             fsl_s_read,
  output logic [WIDTH-1:0] fsl_m_data,
  output logic             fsl_m_write,
  input  logic             fsl_m_full,
  output logic             busy
);

  if (WIDTH != 32) begin : g_width_check
    $error("hybrid_processor supports WIDTH = 32 only");
  end

  ctrl_t   ctrl;
  opcode_t op;
  word_t   final_result;

  control_unit u_ctrl (
    .clk          (clk),
    .rst          (rst),
    .fsl_s_exists (fsl_s_exists),
    .fsl_s_op     (fsl_s_data[2:0]),
    .op           (op),
    .fsl_m_full   (fsl_m_full),
    .fsl_s_read   (fsl_s_read),
    .fsl_m_write  (fsl_m_write),
    .ctrl         (ctrl),
    .busy         (busy)
  );

  hybrid_datapath u_dp (
    .clk          (clk),
    .rst          (rst),
    .ctrl         (ctrl),
    .fsl_s_data   (word_t'(fsl_s_data)),
    .op           (op),
    .final_result (final_result)
  );

  assign fsl_m_data = final_result;

endmodule
