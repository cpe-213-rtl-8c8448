// reg_in_logic: register-to-AUX select (REG_IN) of the WIMP51.
//
// REG_IN is high for the register forms of the instruction set (MOV A,Rn,
// ADDC A,Rn, SUBB A,Rn, ORL/ANL/XRL A,Rn and MOV Rn,A); AUX then loads Rn,
// selected by IR2..IR0, instead of the next program byte. All of these have
// opcode bit 3 set (xxxx1nnn) and all immediate and jump forms have it
// clear, so for defined opcodes REG_IN equals IR3, as in the original
// processor, which needed no change for SUBB. Decoding the five-bit register
// families, so that undefined opcodes never select the bank, is this
// design's choice. Combinational.
module reg_in_logic
  import wimp51_pkg::*;
(
  input  logic [4:0] ir_hi,            // IR7..IR3
  output logic       reg_in
);

  always_comb begin
    unique case (ir_hi)
      OPR_MOV_A_RN, OPR_ADDC_RN, OPR_SUBB_RN, OPR_ORL_RN, OPR_ANL_RN,
      OPR_XRL_RN, OPR_MOV_RN_A: reg_in = 1'b1;
      default:                  reg_in = 1'b0;
    endcase
  end

endmodule
