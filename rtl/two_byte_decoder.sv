// two_byte_decoder: flags the WIMP51 instructions that carry a second byte.
//
// MOV A,#D, ADDC A,#D, SUBB A,#D (the immediate forms) and the jumps SJMP and
// JZ are followed by a data or offset byte; the PC must step over it in the
// Decode cycle. The instruction list follows the instruction set; decoding
// it as a full opcode compare is this design's choice. Combinational.
module two_byte_decoder
  import wimp51_pkg::*;
(
  input  logic [7:0] ir,
  output logic       two_byte
);

  always_comb begin
    unique case (ir)
      OP_MOV_A_IMM, OP_ADDC_IMM, OP_SUBB_IMM, OP_SJMP, OP_JZ: two_byte = 1'b1;
      default:                                                 two_byte = 1'b0;
    endcase
  end

endmodule
