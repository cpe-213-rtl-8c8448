// isa_ref_pkg: instruction-set reference for the WIMP51 testbenches.
//
// Classifies an opcode byte by the bit patterns of the instruction set table
// and models one instruction at the architectural level (A, C, R0-R7, PC).
// It is written from the instruction set alone, independently of the RTL
// decoders, so the testbenches can compare the RTL against it.
package isa_ref_pkg;

  typedef enum int {
    I_MOV_A_IMM, I_ADDC_IMM, I_MOV_RN_A, I_MOV_A_RN, I_ADDC_RN, I_ORL, I_ANL,
    I_XRL, I_SWAP, I_CLR_C, I_SETB_C, I_SJMP, I_JZ, I_SUBB_IMM, I_SUBB_RN,
    I_NOP, I_UNDEF
  } instr_t;

  function automatic instr_t classify(input logic [7:0] op);
    casez (op)
      8'b01110100: return I_MOV_A_IMM;
      8'b00110100: return I_ADDC_IMM;
      8'b11111???: return I_MOV_RN_A;
      8'b11101???: return I_MOV_A_RN;
      8'b00111???: return I_ADDC_RN;
      8'b01001???: return I_ORL;
      8'b01011???: return I_ANL;
      8'b01101???: return I_XRL;
      8'b11000100: return I_SWAP;
      8'b11000011: return I_CLR_C;
      8'b11010011: return I_SETB_C;
      8'b10000000: return I_SJMP;
      8'b01100000: return I_JZ;
      8'b10010100: return I_SUBB_IMM;
      8'b10011???: return I_SUBB_RN;
      8'b00000000: return I_NOP;
      default:     return I_UNDEF;
    endcase
  endfunction

  function automatic bit has_operand_byte(input instr_t i);
    return i inside {I_MOV_A_IMM, I_ADDC_IMM, I_SUBB_IMM, I_SJMP, I_JZ};
  endfunction

  function automatic bit uses_rn(input instr_t i);
    return i inside {I_MOV_RN_A, I_MOV_A_RN, I_ADDC_RN, I_ORL, I_ANL, I_XRL, I_SUBB_RN};
  endfunction

  function automatic bit changes_a(input instr_t i);
    return i inside {I_MOV_A_IMM, I_ADDC_IMM, I_MOV_A_RN, I_ADDC_RN, I_ORL, I_ANL,
                     I_XRL, I_SWAP, I_SUBB_IMM, I_SUBB_RN};
  endfunction

  function automatic bit changes_c(input instr_t i);
    return i inside {I_ADDC_IMM, I_ADDC_RN, I_SUBB_IMM, I_SUBB_RN, I_CLR_C, I_SETB_C};
  endfunction

  // Architectural state of the processor.
  typedef struct {
    logic [7:0] a;
    logic       c;
    logic [7:0] r [8];
    logic [7:0] pc;
  } state_t;

  // Execute the instruction at s.pc in program memory m.
  function automatic void step(ref state_t s, const ref logic [7:0] m [256]);
    logic [7:0] op, d, opnd;
    int         t;
    instr_t     i;
    op = m[s.pc];
    d  = m[8'(s.pc + 1)];
    i  = classify(op);
    opnd = uses_rn(i) ? s.r[op[2:0]] : d;
    s.pc = 8'(s.pc + (has_operand_byte(i) ? 2 : 1));
    case (i)
      I_MOV_A_IMM, I_MOV_A_RN: s.a = opnd;
      I_ADDC_IMM, I_ADDC_RN: begin
        t = int'(s.a) + int'(opnd) + int'(s.c);
        s.a = t[7:0]; s.c = t[8];
      end
      I_SUBB_IMM, I_SUBB_RN: begin
        t = int'(s.a) - int'(opnd) - int'(s.c);
        s.a = t[7:0]; s.c = (t < 0);
      end
      I_MOV_RN_A: s.r[op[2:0]] = s.a;
      I_ORL:  s.a = s.a | opnd;
      I_ANL:  s.a = s.a & opnd;
      I_XRL:  s.a = s.a ^ opnd;
      I_SWAP: s.a = {s.a[3:0], s.a[7:4]};
      I_CLR_C:  s.c = 1'b0;
      I_SETB_C: s.c = 1'b1;
      I_SJMP: s.pc = 8'(s.pc + d);
      I_JZ:   if (s.a == 8'h00) s.pc = 8'(s.pc + d);
      default: ;
    endcase
  endfunction

endpackage
