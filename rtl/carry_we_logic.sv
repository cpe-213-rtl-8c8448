// carry_we_logic: carry flag write enable of the WIMP51.
//
// The carry flag is written in the Execute cycle of ADDC and SUBB (both
// forms), which produce a carry or borrow, and of CLR C and SETB C. The
// instruction list follows the instruction set. Combinational.
module carry_we_logic
  import wimp51_pkg::*;
(
  input  logic       execute,
  input  logic [7:0] ir,
  output logic       c_we
);

  assign c_we = execute && (is_arith(ir) || ir == OP_CLR_C || ir == OP_SETB_C);

endmodule
