// wimp51_pkg: types and opcode constants shared by the WIMP51 blocks.
//
// The WIMP51 is an 8-bit teaching processor with a small subset of the 8051
// instruction set. Every instruction runs in three cycles (Fetch, Decode,
// Execute). This package holds the cycle type, the ALU source-select code
// produced by L_A_SEL, and the opcodes of the instruction set, including the
// SUBB and NOP extensions. The opcode values are those of the instruction
// set table; the L_A_SEL encoding is this design's own choice.
package wimp51_pkg;

  // Cycle of the three-cycle instruction sequence.
  typedef enum logic [1:0] {
    PH_FETCH   = 2'd0,
    PH_DECODE  = 2'd1,
    PH_EXECUTE = 2'd2
  } phase_t;

  // ALU result source, the L1,L0 outputs of L_A_SEL.
  typedef enum logic [1:0] {
    L_LOGIC = 2'b00,  // OR / AND / XOR, function from IR5..IR4
    L_ADDER = 2'b01,  // ADDC and SUBB
    L_SWAP  = 2'b10,  // SWAP A
    L_AUX   = 2'b11   // MOV A,#D and MOV A,Rn
  } lsel_t;

  // Opcodes (full byte) and opcode families (upper five bits for Rn forms).
  localparam logic [7:0] OP_NOP       = 8'h00;
  localparam logic [7:0] OP_MOV_A_IMM = 8'h74;
  localparam logic [7:0] OP_ADDC_IMM  = 8'h34;
  localparam logic [7:0] OP_SUBB_IMM  = 8'h94;
  localparam logic [7:0] OP_SWAP      = 8'hC4;
  localparam logic [7:0] OP_CLR_C     = 8'hC3;
  localparam logic [7:0] OP_SETB_C    = 8'hD3;
  localparam logic [7:0] OP_SJMP      = 8'h80;
  localparam logic [7:0] OP_JZ        = 8'h60;

  localparam logic [4:0] OPR_MOV_RN_A = 5'b11111;
  localparam logic [4:0] OPR_MOV_A_RN = 5'b11101;
  localparam logic [4:0] OPR_ADDC_RN  = 5'b00111;
  localparam logic [4:0] OPR_ORL_RN   = 5'b01001;
  localparam logic [4:0] OPR_ANL_RN   = 5'b01011;
  localparam logic [4:0] OPR_XRL_RN   = 5'b01101;
  localparam logic [4:0] OPR_SUBB_RN  = 5'b10011;

  // Instructions that write the accumulator.
  function automatic logic writes_acc(input logic [7:0] ir);
    return ir == OP_MOV_A_IMM || ir == OP_ADDC_IMM || ir == OP_SUBB_IMM ||
           ir == OP_SWAP ||
           ir[7:3] == OPR_MOV_A_RN || ir[7:3] == OPR_ADDC_RN ||
           ir[7:3] == OPR_ORL_RN   || ir[7:3] == OPR_ANL_RN  ||
           ir[7:3] == OPR_XRL_RN   || ir[7:3] == OPR_SUBB_RN;
  endfunction

  // ADDC and SUBB, immediate and register forms.
  function automatic logic is_arith(input logic [7:0] ir);
    return ir == OP_ADDC_IMM || ir == OP_SUBB_IMM ||
           ir[7:3] == OPR_ADDC_RN || ir[7:3] == OPR_SUBB_RN;
  endfunction

endpackage
