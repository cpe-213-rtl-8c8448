// aux_register: the WIMP51 auxiliary operand register (AUX).
//
// In the Decode cycle AUX takes the ALU's second operand: the register bank
// output when REG_IN is high (Rn forms), otherwise the program byte after
// the opcode (the immediate data, or the jump offset REL). It holds it for
// the Execute cycle. The REG_IN source select follows the original
// processor; the synchronous reset to 0 is this design's choice.
module aux_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       aux_we,
  input  logic       reg_in,
  input  logic [7:0] reg_data,
  input  logic [7:0] mem_data,
  output logic [7:0] aux
);

  always_ff @(posedge clk) begin
    if (rst)         aux <= 8'h00;
    else if (aux_we) aux <= reg_in ? reg_data : mem_data;
  end

endmodule
