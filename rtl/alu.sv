// alu: the WIMP51 arithmetic logic unit.
//
// Computes the value the ACC takes in the Execute cycle from A (the ACC),
// B (AUX), the carry flag and the opcode bits IR7..IR4. L_A_SEL picks the
// source: the logic unit (function from IR5..IR4: 00 OR, 01 AND, 10 XOR, 11 pass B),
// the add/subtract unit (ADDC, SUBB), the nibble swap of A, or B itself.
// Subtract_Enable, decoded from the opcode, switches the adder to SUBB.
// carry_f is the adder's carry (ADDC) or borrow (SUBB) for the carry flag.
// The sections and the SUBB decode follow the original ALU; the select
// encoding is this design's choice. Combinational.
module alu
  import wimp51_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cy,
  input  logic [3:0] ir_hi,            // IR7..IR4
  output logic [7:0] result,
  output logic       carry_f
);

  lsel_t      l;
  logic       sub;
  logic [7:0] sum, logic_out;

  l_a_sel         u_l_a_sel (.ir_hi(ir_hi), .l(l));
  subtract_enable u_sub_en  (.ir_hi(ir_hi), .sub_en(sub));
  addsub_unit     u_addsub  (.a(a), .b(b), .cy(cy), .sub(sub), .sum(sum), .carry_f(carry_f));

  always_comb begin
    unique case (ir_hi[1:0])
      2'b00:   logic_out = a | b;
      2'b01:   logic_out = a & b;
      2'b10:   logic_out = a ^ b;
      default: logic_out = b;
    endcase
  end

  always_comb begin
    unique case (l)
      L_LOGIC: result = logic_out;
      L_ADDER: result = sum;
      L_SWAP:  result = {a[3:0], a[7:4]};
      default: result = b;
    endcase
  end

endmodule
