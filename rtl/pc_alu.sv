// pc_alu: next-PC adder of the WIMP51.
//
// Normally the PC steps by one over each program byte (opcode in Fetch,
// operand in Decode). In the Execute cycle of SJMP or JZ it instead adds the
// signed 8-bit offset REL, held in AUX, to the PC. Because the PC already
// points past the offset byte at that time, the result is the instruction
// set's PC+REL+1 counted from the offset byte. Whether the PC is actually
// written (for JZ only when the ACC is zero) is decided by PC_WE. The jump
// decode is an exact opcode compare, so NOP is never mistaken for a jump.
// Combinational.
module pc_alu
  import wimp51_pkg::*;
#(
  parameter int unsigned PC_W = 8
) (
  input  logic [PC_W-1:0] pc,
  input  logic [7:0]      rel,
  input  logic [7:0]      ir,
  input  logic            execute,
  output logic [PC_W-1:0] next_pc
);

  logic            is_jump;
  logic [PC_W-1:0] rel_ext;

  assign is_jump = (ir == OP_SJMP) || (ir == OP_JZ);
  // Sign-extend (or truncate) the offset to the PC width.
  assign rel_ext = PC_W'($signed(rel));
  assign next_pc = (execute && is_jump) ? pc + rel_ext : pc + PC_W'(1);

endmodule
