// carry_flag: the WIMP51 carry flag CY.
//
// When the carry write enable is high (Execute cycle of ADDC, SUBB, CLR C or
// SETB C) the flag is loaded from the carry select: 0 for CLR C, 1 for SETB
// C, otherwise Carry_F from the ALU (carry for ADDC, borrow for SUBB). The
// flag drives the carry light and the adder's carry-in. The three sources
// follow the instruction set; the synchronous reset to 0 is this design's
// choice.
module carry_flag
  import wimp51_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       c_we,
  input  logic [7:0] ir,
  input  logic       carry_f,
  output logic       cy
);

  logic c_next;

  always_comb begin
    unique case (ir)
      OP_CLR_C:  c_next = 1'b0;
      OP_SETB_C: c_next = 1'b1;
      default:   c_next = carry_f;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       cy <= 1'b0;
    else if (c_we) cy <= c_next;
  end

endmodule
