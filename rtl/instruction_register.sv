// instruction_register: the WIMP51 IR.
//
// Captures the opcode read from program memory at the end of the Fetch cycle
// and holds it through Decode and Execute, where the write-enable logic and
// the ALU decode it. Loading in Fetch follows the original processor; the
// synchronous reset to NOP (00) is this design's choice.
module instruction_register
  import wimp51_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] din,
  output logic [7:0] ir
);

  always_ff @(posedge clk) begin
    if (rst)       ir <= OP_NOP;
    else if (load) ir <= din;
  end

endmodule
