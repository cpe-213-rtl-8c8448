// subtract_enable: SUBB decoder of the WIMP51 ALU control.
//
// Both SUBB forms (SUBB A,#D = 1001 0100, SUBB A,Rn = 1001 1nnn) share the
// upper opcode nibble 1001, which no other instruction uses. An AND of
// IR7, /IR6, /IR5 and IR4 turns it into Subtract_Enable, which switches the
// adder from A+B+CY to A-B-CY. Decoding the upper nibble with an AND gate
// follows the original processor. Combinational.
module subtract_enable (
  input  logic [3:0] ir_hi,            // IR7..IR4
  output logic       sub_en
);

  assign sub_en = ir_hi[3] & ~ir_hi[2] & ~ir_hi[1] & ir_hi[0];

endmodule
