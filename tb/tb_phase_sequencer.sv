// tb_phase_sequencer: self-checking testbench for phase_sequencer.
//
// Checks that reset enters Fetch and that the cycles then repeat
// Fetch, Decode, Execute with exactly one of the three strobes high, and
// that a reset in the middle of the sequence returns to Fetch.
`include "tb_check.svh"
module tb_phase_sequencer;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [1:0] phase; logic fetch, decode, execute;
  phase_sequencer dut (.clk, .rst, .phase, .fetch, .decode, .execute);
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < 30; n++) begin
      `CHECK(phase, 2'(n % 3), "phase")
      `CHECK({fetch, decode, execute}, 3'b100 >> (n % 3), "strobes")
      @(posedge clk); #1;
    end
    // Reset from Decode
    @(posedge clk); #1;
    rst <= 1; @(posedge clk); #1; rst <= 0;
    `CHECK(phase, 2'd0, "reset to fetch")
    `CHECK(fetch, 1'b1, "fetch after reset")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: 100000 cycles
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
