// hyb_pkg: types and constants shared by the hybrid floating-point / LNS processor.
//
// Both number systems use one 32-bit layout: bit 31 is the sign, bits 30:23 an 8-bit
// field and bits 22:0 a 23-bit field.  For a floating-point (FLP) word these are the
// IEEE-754 single-precision biased exponent and fraction; for an LNS word they are the
// integer part e_I and fraction part e_F of the biased base-2 logarithm, so that the
// value is (-1)^s * 2^(e_I.e_F - 127).  Because the layouts coincide, a conversion only
// rewrites the two fields.
//
// Special values (this design's choice, the same for both systems): a word whose 8-bit
// field is 0 is zero (FLP subnormals are flushed), a word whose 8-bit field is 255 is
// infinity when the 23-bit field is 0 and NaN otherwise.
//
// The instruction is held in the low three bits of the control word; the encoding below
// is this design's own.
package hyb_pkg;

  typedef struct packed {
    logic        sign;
    logic [7:0]  ex;     // FLP biased exponent / LNS integer part e_I
    logic [22:0] fr;     // FLP fraction / LNS fraction part e_F
  } word_t;

  typedef enum logic [2:0] {
    OP_FLP_MAF_ADD = 3'd0,   // B*C + A
    OP_FLP_MAF_SUB = 3'd1,   // B*C - A
    OP_FLP_DIV     = 3'd2,   // A / X
    OP_FLP_TO_LNS  = 3'd3,
    OP_LNS_TO_FLP  = 3'd4,
    OP_LNS_ADD     = 3'd5,
    OP_LNS_SUB     = 3'd6,
    OP_RESERVED    = 3'd7
  } opcode_t;

  // One strobe per controller state (<State>_st) plus the register-load strobes
  // derived from the Read state.
  typedef struct packed {
    logic read_st;       // in Read
    logic read_cntl_st;  // load the control word register
    logic read1_st;      // load R1
    logic read2_st;      // load R2
    logic read3_st;      // load R3
    logic exp_st;
    logic maf1_st;
    logic maf2_st;
    logic maf3_st;
    logic div1_st;
    logic div2_st;
    logic div3_st;
    logic write_st;
  } ctrl_t;

  localparam word_t W_ZERO = '{sign: 1'b0, ex: 8'd0,   fr: 23'd0};
  localparam word_t W_ONE  = '{sign: 1'b0, ex: 8'd127, fr: 23'd0};
  localparam word_t W_INF  = '{sign: 1'b0, ex: 8'd255, fr: 23'd0};
  localparam word_t W_NAN  = '{sign: 1'b0, ex: 8'd255, fr: 23'h400000};

  // ln(2) with 48 fraction bits and 1/ln(2) with 40 fraction bits.
  localparam logic [47:0] LN2_F48    = 48'hB172_17F7_D1CF;
  localparam logic [40:0] INVLN2_F40 = 41'h171_5476_52B8;

  function automatic logic is_zero(word_t w);
    return w.ex == 8'd0;
  endfunction

  function automatic logic is_inf(word_t w);
    return (w.ex == 8'hFF) && (w.fr == 23'd0);
  endfunction

  function automatic logic is_nan(word_t w);
    return (w.ex == 8'hFF) && (w.fr != 23'd0);
  endfunction

  // Number of operand words that follow the control word for each instruction.
  function automatic logic [1:0] operand_count(opcode_t op);
    case (op)
      OP_FLP_MAF_ADD, OP_FLP_MAF_SUB: return 2'd3;
      OP_FLP_DIV, OP_LNS_ADD, OP_LNS_SUB: return 2'd2;
      default: return 2'd1;
    endcase
  endfunction

endpackage
