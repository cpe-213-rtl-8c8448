// program_counter: the WIMP51 PC register.
//
// Holds the address of the next program byte. On a clock edge with pc_we
// high it takes next_pc from the PC ALU (PC+1 or PC+REL). The write-enable
// control follows the original processor; the 8-bit default width and the
// synchronous reset to address 0 are this design's choices.
module program_counter #(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            pc_we,
  input  logic [PC_W-1:0] next_pc,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)        pc <= '0;
    else if (pc_we) pc <= next_pc;
  end

endmodule
