// Shared constants and types of the LAC post-quantum extension.
//
// The modulus q = 251 of the coefficient ring, the field GF(2^9) with the
// primitive polynomial p(x) = 1 + x^4 + x^9 of the BCH decoder, and the
// custom opcode 0x77 are those of LAC and of the instruction-set extension.
// The func3 codes, the ternary coefficient encoding and the operand field
// layouts of the multi-cycle units are this design's own choices.
package lac_pkg;

  // Coefficient ring Z_q
  localparam int unsigned Q       = 251;
  localparam int unsigned COEFF_W = 8;

  // GF(2^m) of the BCH code
  localparam int unsigned GF_M    = 9;
  // p(x) without the x^9 term: 1 + x^4
  localparam logic [GF_M-1:0] GF_POLY = 9'b0_0001_0001;

  // Custom opcode of all post-quantum instructions
  localparam logic [6:0] PQ_OPCODE = 7'h77;

  // func3 -> accelerator
  typedef enum logic [2:0] {
    SEL_MUL_TER   = 3'd0,
    SEL_MUL_CHIEN = 3'd1,
    SEL_SHA256    = 3'd2,
    SEL_MODQ      = 3'd3
  } pq_sel_e;

  // Ternary coefficient, two's complement in two bits: 00 = 0, 01 = +1, 11 = -1
  typedef logic [1:0] tern_t;
  localparam tern_t TERN_ZERO = 2'b00;
  localparam tern_t TERN_POS  = 2'b01;
  localparam tern_t TERN_NEG  = 2'b11;

  // Negation of a ternary coefficient (the inverter of the multiplier's sel path)
  function automatic tern_t tern_neg(tern_t t);
    unique case (t)
      TERN_POS: return TERN_NEG;
      TERN_NEG: return TERN_POS;
      default:  return TERN_ZERO;
    endcase
  endfunction

  // Operation mode field rs2[31:30] of pq.mul_ter
  typedef enum logic [1:0] {
    TER_WRITE = 2'd0,   // write 5 b and 5 a coefficients
    TER_START = 2'd1,   // start a multiplication
    TER_READ  = 2'd2,   // read 4 result coefficients
    TER_NOP   = 2'd3
  } ter_mode_e;

  // Operation mode field rs2[31:30] of pq.mul_chien
  typedef enum logic [1:0] {
    CHIEN_LOAD_LEFT  = 2'd0,  // alpha/lambda of multipliers 0 and 1
    CHIEN_LOAD_RIGHT = 2'd1,  // alpha/lambda of multipliers 2 and 3
    CHIEN_CALC       = 2'd2,  // run one round, return out_j
    CHIEN_NOP        = 2'd3
  } chien_mode_e;

  // Request from the pipeline to one unit, and its answer.
  // A request takes effect on the clock edge where en and ready are both high.
  typedef struct packed {
    logic        en;
    logic [31:0] rs1;
    logic [31:0] rs2;
  } pq_req_t;

  typedef struct packed {
    logic        ready;
    logic [31:0] rd;
  } pq_rsp_t;

endpackage
