// w75_scoreboard - the resource table that controls the w75 back end.
//
// The table has one column per functional unit (INT1, INT2, LOAD, STORE) holding a
// busy bit and a counter, and one column per register (R0-R7) holding a location and a
// counter. Every counter means "cycles until ready, minus one": 0 says the unit is free
// next cycle, or the value is produced by the end of this cycle and can be bypassed.
// A register's location names the unit or latch that holds its producer, so a consumer
// in decode knows which bypass input to select. Because instructions leave decode in
// order and each one overwrites its destination's column, the column always describes
// the newest instance of the register.
//
// Update rules, applied on every rising edge:
//  * fu_set[f] (the pipeline puts an instruction into unit f) loads busy=1 and
//    fu_set_cnt[f]. Otherwise a busy unit counts down to 0, and is cleared when the
//    instruction in its stage leaves (stage_move).
//  * iss_valid with iss_wr loads the destination column with iss_loc / iss_cnt.
//  * Otherwise a register whose producer is in stage s follows it: when the producer
//    leaves (stage_move[s]) the location steps along its path (INT1->BP1->BP2->RF,
//    LOAD->INT2->ST->RF); the counter drops by one whenever the producer made progress,
//    i.e. it left its stage or its unit counted down. A load that misses makes no
//    progress, so counters behind it freeze.
// Reads are combinational (regs_o, fus_o); the late load-miss override is applied by
// w75_sb_read.
//
// The table layout, the counter meaning and the location names INT1, BP1, BP2 and LOAD
// follow the notes; the progress rule that freezes counters behind a stalled producer,
// and the names INT2/ST, are this design's own.
module w75_scoreboard
  import w75_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // functional-unit updates
  input  logic     fu_set     [NFU],
  input  cnt_t     fu_set_cnt [NFU],
  // destination-register update when an instruction leaves decode
  input  logic     iss_valid,
  input  logic     iss_wr,
  input  reg_idx_t iss_rd,
  input  loc_t     iss_loc,
  input  cnt_t     iss_cnt,
  // the instruction in each execution stage leaves it at this edge
  input  logic     stage_move [NSTAGE],
  // table contents
  output sb_reg_t  regs_o [NREGS],
  output sb_fu_t   fus_o  [NFU]
);

  sb_reg_t regs [NREGS];
  sb_fu_t  fus  [NFU];
  logic    fu_tick [NSTAGE];

  function automatic stage_t fu_stage(int unsigned f);
    fu_t fu;
    fu = fu_t'(f);
    case (fu)
      FU_INT2:  return ST_E2;
      FU_STORE: return ST_SW;
      default:  return ST_LE;
    endcase
  endfunction

  // A unit that is counting down is making progress on its instruction.
  always_comb begin
    for (int s = 0; s < NSTAGE; s++) fu_tick[s] = 1'b0;
    for (int f = 0; f < NFU; f++)
      if (fus[f].busy && fus[f].cnt != '0) fu_tick[fu_stage(f)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NFU; f++) fus[f] <= '{busy: 1'b0, cnt: '0};
      for (int r = 0; r < NREGS; r++) regs[r] <= '{loc: LOC_RF, cnt: '0};
    end else begin
      for (int f = 0; f < NFU; f++) begin
        if (fu_set[f]) begin
          fus[f] <= '{busy: 1'b1, cnt: fu_set_cnt[f]};
        end else if (fus[f].busy) begin
          if (fus[f].cnt != '0)              fus[f].cnt  <= fus[f].cnt - cnt_t'(1);
          else if (stage_move[fu_stage(f)])  fus[f].busy <= 1'b0;
        end
      end
      for (int r = 0; r < NREGS; r++) begin
        if (iss_valid && iss_wr && iss_rd == reg_idx_t'(r)) begin
          regs[r] <= '{loc: iss_loc, cnt: iss_cnt};
        end else if (regs[r].loc != LOC_RF) begin
          if (stage_move[loc_stage(regs[r].loc)]) begin
            regs[r].loc <= loc_next(regs[r].loc);
            regs[r].cnt <= (regs[r].cnt != '0) ? regs[r].cnt - cnt_t'(1) : '0;
          end else if (fu_tick[loc_stage(regs[r].loc)] && regs[r].cnt != '0) begin
            regs[r].cnt <= regs[r].cnt - cnt_t'(1);
          end
        end
      end
    end
  end

  assign regs_o = regs;
  assign fus_o  = fus;

  // A unit may only be given a new instruction when it is free next cycle.
  for (genvar f = 0; f < NFU; f++) begin : g_fu_chk
    a_fu_free : assert property (@(posedge clk) disable iff (!rst_n)
      fu_set[f] |-> (!fus[f].busy || fus[f].cnt == '0));
  end

endmodule
