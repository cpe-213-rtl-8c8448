// accumulator: the WIMP51 ACC and its zero flag.
//
// The ACC holds the result of the last ALU instruction and is loaded from the
// ALU at the end of the Execute cycle when ACC_WE is high. zero is high while
// the ACC is 00 and is the condition of JZ. The zero flag as a combinational
// compare and the synchronous reset to 0 are this design's choices.
module accumulator (
  input  logic       clk,
  input  logic       rst,
  input  logic       acc_we,
  input  logic [7:0] din,
  output logic [7:0] acc,
  output logic       zero
);

  always_ff @(posedge clk) begin
    if (rst)         acc <= 8'h00;
    else if (acc_we) acc <= din;
  end

  assign zero = (acc == 8'h00);

endmodule
