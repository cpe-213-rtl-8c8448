// regbank_we_logic: register bank write enable of the WIMP51.
//
// MOV Rn,A (11111nnn) is the only instruction that writes a working
// register; the ACC is stored into Rn at the end of its Execute cycle.
// Writing in Execute is this design's choice. Combinational.
module regbank_we_logic
  import wimp51_pkg::*;
(
  input  logic       execute,
  input  logic [4:0] ir_hi,            // IR7..IR3
  output logic       reg_we
);

  assign reg_we = execute && (ir_hi == OPR_MOV_RN_A);

endmodule
