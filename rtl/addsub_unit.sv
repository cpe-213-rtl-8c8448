// addsub_unit: the WIMP51 adder, extended to subtract.
//
// An 8-bit ripple-carry adder computes A + B' + cin. For ADDC, B' = B and
// cin = CY. For SUBB, Subtract_Enable drives XOR gates that invert every bit
// of B, and the carry-in multiplexer feeds the inverted carry flag, so the
// adder forms A + ~B + ~CY = A - B - CY (two's complement without a separate
// +1 stage). For subtraction the raw carry-out is 1 when the difference is
// not negative; it is inverted so that Carry_F, and thus CY, holds the
// borrow as on the 8051. The XOR inversion, carry-in multiplexer and ripple
// adder follow the original design; doing the borrow in the one adder
// (rather than with a second adder) is this design's choice. Combinational.
module addsub_unit (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cy,
  input  logic       sub,
  output logic [7:0] sum,
  output logic       carry_f
);

  logic [7:0] b_x;      // B after the XOR gates
  logic [8:0] c;        // ripple carries, c[0] is the carry-in

  assign b_x  = b ^ {8{sub}};
  assign c[0] = sub ? ~cy : cy;    // carry multiplexer

  for (genvar i = 0; i < 8; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b_x[i] ^ c[i];
    assign c[i+1]  = (a[i] & b_x[i]) | (c[i] & (a[i] ^ b_x[i]));
  end

  assign carry_f = sub ? ~c[8] : c[8];

endmodule
