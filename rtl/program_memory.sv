// program_memory: byte-wide program store of the WIMP51.
//
// Holds opcodes and their immediate / relative operand bytes. The processor
// reads it at the PC address with an asynchronous read, so the byte is
// available in the same cycle in which it is loaded into IR or AUX. A
// synchronous write port loads programs while the core is held in reset.
// The size (2**PC_W bytes) and the load port are this design's choices; the
// processor only needs a store addressed by the PC.
module program_memory #(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic [PC_W-1:0] addr,
  output logic [7:0]      rdata,
  input  logic            load_we,
  input  logic [PC_W-1:0] load_addr,
  input  logic [7:0]      load_data
);

  logic [7:0] mem [2**PC_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = mem[addr];

endmodule
