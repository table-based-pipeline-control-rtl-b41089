// w75_bypass_mux - operand selector at the end of Decode/RF read.
//
// Bypassing happens at the very end of a cycle: a value produced anywhere in the
// pipeline in this cycle travels the bypass wires, passes this multiplexer and is caught
// by the latch in front of Load/Exec1. The select input is the location the scoreboard
// holds for the source register; one input per location, seven in all. For a
// location in stage LE or E2 the input is an ALU or load-port output of the current
// cycle; for BP1, BP2 and ST it is a pipeline latch; for the register file it is the
// read port. Purely combinational.
//
// The seven-input multiplexer follows the notes; the ordering of inputs is this design's.
module w75_bypass_mux
  import w75_pkg::*;
(
  input  loc_t  sel,
  input  word_t src [NLOC],   // indexed by loc_t
  output word_t out
);

  always_comb begin
    unique case (sel)
      LOC_INT1: out = src[LOC_INT1];
      LOC_BP1:  out = src[LOC_BP1];
      LOC_BP2:  out = src[LOC_BP2];
      LOC_LOAD: out = src[LOC_LOAD];
      LOC_INT2: out = src[LOC_INT2];
      LOC_ST:   out = src[LOC_ST];
      default:  out = src[LOC_RF];
    endcase
  end

endmodule
