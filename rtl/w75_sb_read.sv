// w75_sb_read - one register read port of the scoreboard, with the late load-miss
// override.
//
// A load sets its destination's counter to 0 when it leaves decode, before it knows
// whether the cache will hit. This port selects the column of register idx and, if that
// column points at the load port (LOC_LOAD) while the load in Load/Exec1 is missing the
// cache (ld_miss, known late in the cycle), replaces the counter by CNT_INF, a
// non-zero value, so the consumer in decode stalls. ready is high when the resulting
// counter is 0: the value can be caught from location loc at the end of this cycle.
// Purely combinational.
//
// The override multiplexer (counter or "infinity", chosen by the hit signal) follows the
// notes; the encoding of "infinity" as an all-ones counter is this design's own.
module w75_sb_read
  import w75_pkg::*;
(
  input  sb_reg_t  regs [NREGS],
  input  reg_idx_t idx,
  input  logic     ld_miss,
  output loc_t     loc,
  output cnt_t     cnt,
  output logic     ready
);

  sb_reg_t e;

  always_comb begin
    e     = regs[idx];
    loc   = e.loc;
    cnt   = (e.loc == LOC_LOAD && ld_miss) ? CNT_INF : e.cnt;
    ready = (cnt == '0);
  end

endmodule
