// tb_program_memory: self-checking testbench for program_memory.
//
// Fills the memory with a pattern through the load port, then reads every
// address back with the asynchronous read port and rewrites some bytes.
`include "tb_check.svh"
module tb_program_memory;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] addr, rdata, load_addr, load_data; logic load_we = 0;
  logic [7:0] model [256];
  program_memory dut (.clk, .addr, .rdata, .load_we, .load_addr, .load_data);
  initial begin
    for (int a = 0; a < 256; a++) begin
      model[a] = 8'($urandom);
      load_we <= 1; load_addr <= 8'(a); load_data <= model[a];
      @(posedge clk);
    end
    load_we <= 0;
    @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(255 - a); #1;
      `CHECK(rdata, model[255 - a], "read")
    end
    for (int n = 0; n < 200; n++) begin
      load_we <= 1; load_addr <= 8'($urandom); load_data <= 8'($urandom);
      @(posedge clk); #1;
      model[load_addr] = load_data;
      load_we <= 0;
      addr = 8'($urandom); #1;
      `CHECK(rdata, model[addr], "read after write")
    end
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
