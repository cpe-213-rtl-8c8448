// tb_addsub_unit: self-checking testbench for addsub_unit.
//
// Drives the block with exhaustive or random inputs and compares its
// outputs with values derived independently from the instruction set
// (isa_ref_pkg) or from integer arithmetic.
`include "tb_check.svh"
module tb_addsub_unit;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum; logic cy, sub, carry_f; int t;
  addsub_unit dut (.a, .b, .cy, .sub, .sum, .carry_f);
  initial begin
    // Exhaustive: A, B, CY, ADD/SUB. Reference uses integer arithmetic:
    // ADDC: carry = bit 8 of A+B+CY. SUBB: borrow = A-B-CY < 0.
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        for (int k = 0; k < 4; k++) begin
          a = 8'(ia); b = 8'(ib); cy = k[0]; sub = k[1]; #1;
          t = sub ? ia - ib - int'(cy) : ia + ib + int'(cy);
          `CHECK(sum, t[7:0], "sum")
          `CHECK(carry_f, sub ? (t < 0) : t[8], "carry_f")
        end
    // Worked examples of the SUBB check program: 6-1-0 = 5, 5-5-1 = FF borrow.
    a = 8'h06; b = 8'h01; cy = 0; sub = 1; #1;
    `CHECK({carry_f, sum}, 9'h005, "6-1-0")
    a = 8'h05; b = 8'h05; cy = 1; sub = 1; #1;
    `CHECK({carry_f, sum}, 9'h1FF, "5-5-1")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
