// w75_issue_logic - decides whether the instruction in Decode/RF read proceeds to
// Load/Exec1 at the next edge.
//
// It proceeds when every register operand it needs in decode is ready (scoreboard
// counter 0 after the load-miss override), the first unit on its path (INT1, or LOAD
// for instructions that take the memory path) is free next cycle (not busy, or busy
// with counter 0), the LE stage will be empty (a unit that finished may still be held
// by a stalled E2), and no memory dependency holds it. Otherwise it stays in decode and
// polls again next cycle. The stall_* outputs name each reason that holds (several may
// be set at once). Purely combinational.
//
// need_a / need_b say which operands must be ready already in decode: all operands it
// reads in the default pipeline; when operands are checked a second time in the load
// stage, only load addresses and sources that are also the destination.
//
// The register and unit checks follow the notes; the explicit LE-free check and the
// reason outputs are this design's own.
module w75_issue_logic
  import w75_pkg::*;
(
  input  logic   d_valid,
  input  logic   need_a,     // operand A must be ready now
  input  logic   need_b,     // operand B must be ready now
  input  logic   use_load,   // first unit is the LOAD column (else INT1)
  input  logic   a_ready,
  input  logic   b_ready,
  input  sb_fu_t fus [NFU],
  input  logic   le_free,
  input  logic   mem_stall,
  output logic   issue,
  output logic   stall_data,
  output logic   stall_fu,
  output logic   stall_struct,
  output logic   stall_mem
);

  sb_fu_t first_fu;

  always_comb begin
    first_fu     = use_load ? fus[FU_LOAD] : fus[FU_INT1];
    stall_data   = d_valid && ((need_a && !a_ready) || (need_b && !b_ready));
    stall_fu     = d_valid && first_fu.busy && first_fu.cnt != '0;
    stall_struct = d_valid && !le_free;
    stall_mem    = d_valid && mem_stall;
    issue        = d_valid && !stall_data && !stall_fu && !stall_struct && !stall_mem;
  end

endmodule
