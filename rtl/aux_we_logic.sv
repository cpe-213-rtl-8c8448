// aux_we_logic: AUX write enable (AUX_WE) of the WIMP51.
//
// AUX takes its operand in the Decode cycle of every instruction except
// SETB C, CLR C and SWAP A, which have no operand. Following the original
// processor, other operand-less instructions (NOP, undefined opcodes) still
// load AUX; nothing reads it afterwards. Combinational.
module aux_we_logic
  import wimp51_pkg::*;
(
  input  logic       decode,
  input  logic [7:0] ir,
  output logic       aux_we
);

  assign aux_we = decode && !(ir == OP_SETB_C || ir == OP_CLR_C || ir == OP_SWAP);

endmodule
