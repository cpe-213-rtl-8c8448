// acc_we_logic: accumulator write enable (ACC_WE) of the WIMP51.
//
// The ACC is loaded from the ALU at the end of the Execute cycle of the
// instructions that change A: MOV A,#D, MOV A,Rn, ADDC, SUBB, ORL, ANL, XRL
// and SWAP. It stays off for the jumps and for NOP, as in the original
// processor, and also for MOV Rn,A, CLR C and SETB C, which leave A as it
// is; this last point is this design's choice. Port names EXECUTE, IR and
// ACC_WE follow the original block. Combinational.
module acc_we_logic
  import wimp51_pkg::*;
(
  input  logic       execute,
  input  logic [7:0] ir,
  output logic       acc_we
);

  assign acc_we = execute && writes_acc(ir);

endmodule
