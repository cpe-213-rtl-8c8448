// register_bank: the eight working registers R0-R7 of the WIMP51.
//
// One asynchronous read port feeds AUX in the Decode cycle of the Rn forms of
// the instructions; one synchronous write port stores the ACC in the Execute
// cycle of MOV Rn,A. Eight registers follow the 3-bit register field of the
// instruction set; clearing them on reset is this design's choice.
module register_bank #(
  parameter int unsigned NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] raddr,
  output logic [7:0]               rdata,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [7:0]               wdata
);

  logic [7:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= 8'h00;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
