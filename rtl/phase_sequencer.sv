// phase_sequencer: the Fetch -> Decode -> Execute cycle counter of the WIMP51.
//
// Every instruction takes exactly three clock cycles. In Fetch the opcode is
// read into the instruction register, in Decode the operand is read into AUX,
// and in Execute the accumulator, carry, register bank and (for jumps) the PC
// are written. The three cycles follow the instruction timing of the original
// processor; a synchronous active-high reset that restarts in Fetch is this
// design's choice.
//
// Interface: phase is the current cycle; fetch/decode/execute are its one-hot
// decode, valid throughout the cycle.
module phase_sequencer
  import wimp51_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output phase_t phase,
  output logic   fetch,
  output logic   decode,
  output logic   execute
);

  always_ff @(posedge clk) begin
    if (rst) phase <= PH_FETCH;
    else begin
      unique case (phase)
        PH_FETCH:   phase <= PH_DECODE;
        PH_DECODE:  phase <= PH_EXECUTE;
        default:    phase <= PH_FETCH;
      endcase
    end
  end

  assign fetch   = (phase == PH_FETCH);
  assign decode  = (phase == PH_DECODE);
  assign execute = (phase == PH_EXECUTE);

  // Exactly one cycle is active at any time.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot({fetch, decode, execute}));

endmodule
