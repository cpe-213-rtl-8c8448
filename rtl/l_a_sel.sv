// l_a_sel: ALU result-source select (L_A_SEL) of the WIMP51.
//
// Decodes the opcode's upper nibble IR7..IR4 into the two select lines L1,L0
// that pick which ALU section drives the new ACC value: the logic unit
// (ORL, ANL, XRL), the adder (ADDC and, after this extension, SUBB), the
// nibble swap (SWAP A), or the AUX operand unchanged (MOV A,#D, MOV A,Rn).
// The inputs and the L1,L0 outputs follow the original block; the code
// assigned to each section is this design's choice (see wimp51_pkg::lsel_t).
// Opcodes that do not write the ACC get L_AUX, which is never stored.
// Combinational.
module l_a_sel
  import wimp51_pkg::*;
(
  input  logic [3:0] ir_hi,            // IR7..IR4
  output lsel_t      l                 // {L1, L0}
);

  always_comb begin
    unique case (ir_hi)
      4'b0100, 4'b0101, 4'b0110: l = L_LOGIC;  // ORL, ANL, XRL
      4'b0011, 4'b1001:          l = L_ADDER;  // ADDC, SUBB
      4'b1100:                   l = L_SWAP;   // SWAP A
      default:                   l = L_AUX;    // MOV A,#D / MOV A,Rn
    endcase
  end

endmodule
