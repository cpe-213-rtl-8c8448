// wimp51: the WIMP51 teaching processor with the SUBB and NOP extensions.
//
// An 8-bit accumulator machine running a 16-instruction subset of the 8051
// instruction set (MOV, ADDC, SUBB, ORL, ANL, XRL, SWAP, CLR C, SETB C,
// SJMP, JZ, NOP). Each instruction takes three cycles:
//   Fetch   - IR <= mem[PC]; PC <= PC+1.
//   Decode  - AUX <= Rn (REG_IN) or mem[PC]; PC <= PC+1 for two-byte
//             instructions (AUX_WE, PC_WE).
//   Execute - ACC <= ALU(ACC, AUX, CY) (ACC_WE); CY <= carry select (C_WE);
//             Rn <= ACC for MOV Rn,A; PC <= PC+REL for SJMP and taken JZ.
// The write enables are decoded from the IR and the current cycle, so no
// block is written in a cycle where it is not used. The block split and the
// write-enable rules follow the original processor; the wiring between the
// blocks, the load port, the reset and the treatment of undefined opcodes
// (they act as one-byte no-ops) are this design's choices.
//
// Interface: hold rst high while loading the program through load_we /
// load_addr / load_data; after rst falls execution starts at address 0 in
// the Fetch cycle. acc, carry, pc, ir and phase show the machine state.
module wimp51
  import wimp51_pkg::*;
#(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load_we,
  input  logic [PC_W-1:0] load_addr,
  input  logic [7:0]      load_data,
  output logic [7:0]      acc,
  output logic            carry,
  output logic [PC_W-1:0] pc,
  output logic [7:0]      ir,
  output phase_t          phase
);

  logic            fetch, decode, execute;
  logic [7:0]      mem_data, aux, reg_data, alu_result;
  logic [PC_W-1:0] next_pc;
  logic            two_byte, zero, carry_f;
  logic            pc_we, aux_we, acc_we, c_we, reg_in, reg_we;

  // Sequencing and program fetch
  phase_sequencer u_seq (.clk, .rst, .phase, .fetch, .decode, .execute);

  program_memory #(.PC_W(PC_W)) u_mem (
    .clk, .addr(pc), .rdata(mem_data), .load_we, .load_addr, .load_data);

  program_counter #(.PC_W(PC_W)) u_pc (.clk, .rst, .pc_we, .next_pc, .pc);

  pc_alu #(.PC_W(PC_W)) u_pc_alu (.pc, .rel(aux), .ir, .execute, .next_pc);

  instruction_register u_ir (.clk, .rst, .load(fetch), .din(mem_data), .ir);

  // Datapath
  register_bank #(.NREGS(8)) u_regs (
    .clk, .rst, .raddr(ir[2:0]), .rdata(reg_data), .we(reg_we), .waddr(ir[2:0]), .wdata(acc));

  aux_register u_aux (.clk, .rst, .aux_we, .reg_in, .reg_data, .mem_data, .aux);

  alu u_alu (.a(acc), .b(aux), .cy(carry), .ir_hi(ir[7:4]), .result(alu_result), .carry_f);

  accumulator u_acc (.clk, .rst, .acc_we, .din(alu_result), .acc, .zero);

  carry_flag u_cy (.clk, .rst, .c_we, .ir, .carry_f, .cy(carry));

  // Write-enable logic
  two_byte_decoder u_two_byte (.ir, .two_byte);
  pc_we_logic      u_pc_we    (.fetch, .decode, .execute, .ir, .two_byte, .zero, .pc_we);
  aux_we_logic     u_aux_we   (.decode, .ir, .aux_we);
  acc_we_logic     u_acc_we   (.execute, .ir, .acc_we);
  carry_we_logic   u_c_we     (.execute, .ir, .c_we);
  reg_in_logic     u_reg_in   (.ir_hi(ir[7:3]), .reg_in);
  regbank_we_logic u_reg_we   (.execute, .ir_hi(ir[7:3]), .reg_we);

  // The PC moves only in the way the cycle allows: never in Decode of a
  // one-byte instruction.
  a_pc_decode: assert property (@(posedge clk) disable iff (rst)
    (decode && !two_byte) |-> !pc_we);

endmodule
