// pc_we_logic: program counter write enable (PC_WE) of the WIMP51.
//
// The PC is written in every Fetch cycle (it steps past the opcode), in the
// Decode cycle of a two-byte instruction (it steps past the data or offset
// byte, which is why SUBB A,#D keeps PC_WE on for longer), and in the
// Execute cycle of SJMP, or of JZ when the ACC is zero (it takes PC+REL).
// It stays off in Execute for every other instruction, NOP included. These
// rules follow the original processor. Combinational.
module pc_we_logic
  import wimp51_pkg::*;
(
  input  logic       fetch,
  input  logic       decode,
  input  logic       execute,
  input  logic [7:0] ir,
  input  logic       two_byte,
  input  logic       zero,
  output logic       pc_we
);

  logic jump_taken;

  assign jump_taken = (ir == OP_SJMP) || (ir == OP_JZ && zero);
  assign pc_we      = fetch || (decode && two_byte) || (execute && jump_taken);

endmodule
