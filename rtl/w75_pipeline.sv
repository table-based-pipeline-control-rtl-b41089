// w75_pipeline - back end of the w75 five-stage pipeline, controlled by a table
// (scoreboard) instead of a hand-built state machine.
//
// Stages: Decode/RF read (D), Load/Exec1 (LE), Exec2 (E2), Store/Write-back (SW). Two
// paths run through LE..SW with at most one instruction per stage:
//   lower path - register and immediate operations: INT1 in LE, then latches BP1 (E2)
//                and BP2 (SW), register write at the end of SW;
//   upper path - loads, load-ops, stores and load-op-stores: cache load port in LE,
//                INT2 in E2, latch ST and cache store port / register write in SW.
// In D the instruction reads the register file and, in parallel, the scoreboard. For
// each source the scoreboard says whether the newest value is ready by the end of this
// cycle and where it is; the bypass multiplexers then take it from the register file
// or from any of six in-flight places and the LE latch catches it. If a source, the
// first unit, the LE stage or a memory dependency is not ready, the instruction stays
// in D and asks again next cycle. A multiply (MUL_LAT cycles) or a divide (DIV_LAT
// cycles) holds INT1 or INT2 and dependants poll the counters; a load that misses holds LE, and the late override in
// the scoreboard read port stops a dependant that was told "ready".
//
// Interface:
//   in_valid/in_ready/in_uop - decoded instructions in program order (valid/ready; one
//                              is taken when both are high at a rising edge)
//   ld_*                     - cache load port used in LE; ld_hit and ld_rdata are
//                              expected combinationally in the same cycle as ld_req
//   st_*                     - cache store port, written at the rising edge ending SW
//   wb_*                     - register write of the instruction leaving SW
//   rf_o, sb_regs_o, sb_fus_o, ev_* - observation of state and of control decisions
// Reset is asynchronous, active low; it empties the pipeline and zeroes R0-R7.
//
// Two optional modes remove the second set of execution resources:
//   UNIFORM = 1     - every instruction takes the upper path; those that do not touch
//                     memory skip the cache in LE and SW. INT1 and BP1/BP2 are then never
//                     used (synthesis removes INT1). An ALU result now needs a cycle in LE
//                     first, so its destination counter starts one higher and a dependant
//                     cannot follow back to back.
//   SECOND_READ = 1 - (with UNIFORM) an instruction may enter LE with register sources
//                     not yet ready; a second scoreboard read port and bypass multiplexer
//                     per operand in LE catch them there, and LE holds (ev_stall_late)
//                     until they arrive. Load addresses, and sources that are also the
//                     destination, must still be ready in decode.
//
// Stage structure, bypass timing, scoreboard use and the two modes follow the notes; the decoded
// instruction record, the handshakes and the observation outputs are this design's own.
module w75_pipeline
  import w75_pkg::*;
#(
  parameter bit UNIFORM     = 1'b0,  // 1: every instruction takes the memory path, one ALU
  parameter bit SECOND_READ = 1'b0   // with UNIFORM: operands checked again in the load stage
) (
  input  logic     clk,
  input  logic     rst_n,
  // decoded instruction stream
  input  logic     in_valid,
  output logic     in_ready,
  input  uop_t     in_uop,
  // data cache load port (LE)
  output logic     ld_req,
  output word_t    ld_addr,
  input  logic     ld_hit,
  input  word_t    ld_rdata,
  // data cache store port (SW)
  output logic     st_req,
  output word_t    st_addr,
  output word_t    st_wdata,
  // register write-back (SW)
  output logic     wb_en,
  output reg_idx_t wb_idx,
  output word_t    wb_data,
  // observation
  output word_t    rf_o      [NREGS],
  output sb_reg_t  sb_regs_o [NREGS],
  output sb_fu_t   sb_fus_o  [NFU],
  output logic     ev_issue,
  output logic     ev_stall_data,
  output logic     ev_stall_fu,
  output logic     ev_stall_struct,
  output logic     ev_stall_mem,
  output logic     ev_ld_miss,
  output logic     ev_stall_late,
  output loc_t     ev_loc_a,
  output loc_t     ev_loc_b
);

  localparam bit SR = UNIFORM && SECOND_READ;

  // Instruction takes the memory path (load port, INT2, store port).
  function automatic logic on_mem_path(uop_t u);
    return UNIFORM || uop_upper(u);
  endfunction

  // Destination counter loaded when the instruction leaves decode: on the lower path
  // the ALU latency - 1; on the memory path one cycle in the load stage plus the INT2
  // latency, minus one; a plain load is ready at the end of the load stage (0,
  // corrected late on a miss).
  function automatic cnt_t issue_cnt(uop_t u);
    if (!on_mem_path(u))                              return op_latency(u.op) - cnt_t'(1);
    else if (u.src_mode == SRC_MEM && u.op == ALU_MOV) return cnt_t'(0);
    else                                              return op_latency(u.op);
  endfunction

  // ---------------- pipeline latches ------------------------------------------------
  logic  d_valid;
  uop_t  d_uop;

  logic  le_valid, le_first;
  logic  le_pa, le_pb;          // operand still to be caught in the load stage
  uop_t  le_uop;
  word_t le_a, le_b;

  logic  e2_valid, e2_first;
  uop_t  e2_uop;
  word_t e2_a, e2_b, e2_mem, bp1_q;

  logic  sw_valid;
  uop_t  sw_uop;
  word_t sw_addr, bp2_q, st_q;

  // ---------------- control signals -------------------------------------------------
  logic    issue, le_free, e2_free, move_le, move_e2, move_sw, le_done, ld_miss;
  logic    stall_data, stall_fu, stall_struct, stall_mem, mem_stall;
  logic    a_ready, b_ready, need_a, need_b, reads_a, reads_b;
  loc_t    a_loc, b_loc;
  cnt_t    a_cnt, b_cnt;
  word_t   rf_a, rf_b, byp_a, byp_b, op_a, op_b;
  logic    la_ready, lb_ready, late_stall;
  loc_t    la_loc, lb_loc;
  cnt_t    la_cnt, lb_cnt;
  word_t   byp_la, byp_lb, le_a_now, le_b_now;
  word_t   src_la [NLOC];
  word_t   src_lb [NLOC];
  word_t   int1_res, int2_res, int2_x, int2_y;
  logic    int1_done, int2_done;
  word_t   src_a [NLOC];
  word_t   src_b [NLOC];
  sb_reg_t sb_regs [NREGS];
  sb_fu_t  sb_fus  [NFU];
  logic    fu_set     [NFU];
  cnt_t    fu_set_cnt [NFU];
  logic    stage_move   [NSTAGE];
  logic    stage_valid  [NSTAGE];
  logic    stage_stores [NSTAGE];

  // ---------------- Decode / RF read ------------------------------------------------
  assign in_ready = !d_valid || issue;

  w75_regfile u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ra_idx (d_uop.ra),
    .ra_data(rf_a),
    .rb_idx (d_uop.rb),
    .rb_data(rf_b),
    .we     (wb_en),
    .w_idx  (wb_idx),
    .w_data (wb_data),
    .regs_o (rf_o)
  );

  w75_sb_read u_sb_rd_a (
    .regs(sb_regs), .idx(d_uop.ra), .ld_miss(ld_miss),
    .loc(a_loc), .cnt(a_cnt), .ready(a_ready)
  );

  w75_sb_read u_sb_rd_b (
    .regs(sb_regs), .idx(d_uop.rb), .ld_miss(ld_miss),
    .loc(b_loc), .cnt(b_cnt), .ready(b_ready)
  );

  // Bypass sources, one per location. Only the register-file input differs per port.
  always_comb begin
    src_a[LOC_RF]   = rf_a;
    src_a[LOC_INT1] = int1_res;
    src_a[LOC_BP1]  = bp1_q;
    src_a[LOC_BP2]  = bp2_q;
    src_a[LOC_LOAD] = ld_rdata;
    src_a[LOC_INT2] = int2_res;
    src_a[LOC_ST]   = st_q;
    src_b           = src_a;
    src_b[LOC_RF]   = rf_b;
  end

  w75_bypass_mux u_byp_a (.sel(a_loc), .src(src_a), .out(byp_a));
  w75_bypass_mux u_byp_b (.sel(b_loc), .src(src_b), .out(byp_b));

  assign op_a = byp_a;
  assign op_b = (d_uop.src_mode == SRC_IMM) ? d_uop.imm : byp_b;

  always_comb begin
    stage_valid[ST_LE]  = le_valid;
    stage_valid[ST_E2]  = e2_valid;
    stage_valid[ST_SW]  = sw_valid;
    stage_stores[ST_LE] = uop_stores(le_uop);
    stage_stores[ST_E2] = uop_stores(e2_uop);
    stage_stores[ST_SW] = uop_stores(sw_uop);
  end

  w75_mem_dep u_memdep (
    .d_valid     (d_valid),
    .d_loads     (uop_loads(d_uop)),
    .stage_valid (stage_valid),
    .stage_stores(stage_stores),
    .stall       (mem_stall)
  );

  // Operands that must be ready in decode. With the second read only the load address
  // must; the others may be caught in the load stage, except a source that is also
  // the destination, whose column the instruction itself overwrites when it leaves.
  always_comb begin
    reads_a = uop_reads_a(d_uop);
    reads_b = uop_reads_b(d_uop);
    if (SR) begin
      need_a = reads_a && !(d_uop.dst_mem && !uop_loads(d_uop));
      need_b = reads_b && (d_uop.src_mode == SRC_MEM ||
                           (!d_uop.dst_mem && d_uop.rb == d_uop.ra));
    end else begin
      need_a = reads_a;
      need_b = reads_b;
    end
  end

  w75_issue_logic u_issue (
    .d_valid     (d_valid),
    .need_a      (need_a),
    .need_b      (need_b),
    .use_load    (on_mem_path(d_uop)),
    .a_ready     (a_ready),
    .b_ready     (b_ready),
    .fus         (sb_fus),
    .le_free     (le_free),
    .mem_stall   (mem_stall),
    .issue       (issue),
    .stall_data  (stall_data),
    .stall_fu    (stall_fu),
    .stall_struct(stall_struct),
    .stall_mem   (stall_mem)
  );

  // ---------------- Load / Exec1 ----------------------------------------------------
  assign ld_req  = le_valid && uop_loads(le_uop);
  assign ld_addr = (le_uop.src_mode == SRC_MEM) ? le_b : le_a;
  assign ld_miss = ld_req && !ld_hit;

  w75_exec_unit u_int1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(le_valid && !on_mem_path(le_uop)),
    .in_first(le_first),
    .op      (le_uop.op),
    .a       (le_a),
    .b       (le_b),
    .result  (int1_res),
    .done    (int1_done)
  );

  // Second scoreboard read: operands left open in decode are caught here, at the end
  // of the first cycle in which they are ready; until then the stage holds.
  w75_sb_read u_sb_rd_la (
    .regs(sb_regs), .idx(le_uop.ra), .ld_miss(ld_miss),
    .loc(la_loc), .cnt(la_cnt), .ready(la_ready)
  );

  w75_sb_read u_sb_rd_lb (
    .regs(sb_regs), .idx(le_uop.rb), .ld_miss(ld_miss),
    .loc(lb_loc), .cnt(lb_cnt), .ready(lb_ready)
  );

  always_comb begin
    src_la         = src_a;
    src_la[LOC_RF] = le_a;     // never selected: an open operand's producer is ahead
    src_lb         = src_a;
    src_lb[LOC_RF] = le_b;
  end

  w75_bypass_mux u_byp_la (.sel(la_loc), .src(src_la), .out(byp_la));
  w75_bypass_mux u_byp_lb (.sel(lb_loc), .src(src_lb), .out(byp_lb));

  assign late_stall = le_valid && ((le_pa && !la_ready) || (le_pb && !lb_ready));
  assign le_a_now   = le_pa ? byp_la : le_a;
  assign le_b_now   = le_pb ? byp_lb : le_b;

  assign le_done = on_mem_path(le_uop) ? (!ld_miss && !late_stall) : int1_done;
  assign move_le = le_valid && le_done && e2_free;
  assign le_free = !le_valid || move_le;

  // ---------------- Exec2 -----------------------------------------------------------
  // INT2 computes "A op B" where the memory word replaces whichever operand is in memory.
  assign int2_x = (e2_uop.dst_mem && uop_loads(e2_uop)) ? e2_mem : e2_a;
  assign int2_y = (e2_uop.src_mode == SRC_MEM)           ? e2_mem : e2_b;

  w75_exec_unit u_int2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(e2_valid && on_mem_path(e2_uop)),
    .in_first(e2_first),
    .op      (e2_uop.op),
    .a       (int2_x),
    .b       (int2_y),
    .result  (int2_res),
    .done    (int2_done)
  );

  assign move_e2 = e2_valid && (!on_mem_path(e2_uop) || int2_done);
  assign e2_free = !e2_valid || move_e2;

  // ---------------- Store / Write-back ----------------------------------------------
  assign move_sw  = sw_valid;
  assign st_req   = sw_valid && uop_stores(sw_uop);
  assign st_addr  = sw_addr;
  assign st_wdata = st_q;
  assign wb_en    = sw_valid && uop_writes_reg(sw_uop);
  assign wb_idx   = sw_uop.ra;
  assign wb_data  = on_mem_path(sw_uop) ? st_q : bp2_q;

  // ---------------- latches ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid  <= 1'b0;
      d_uop    <= '0;
      le_valid <= 1'b0;
      le_first <= 1'b0;
      le_pa    <= 1'b0;
      le_pb    <= 1'b0;
      le_uop   <= '0;
      le_a     <= '0;
      le_b     <= '0;
      e2_valid <= 1'b0;
      e2_first <= 1'b0;
      e2_uop   <= '0;
      e2_a     <= '0;
      e2_b     <= '0;
      e2_mem   <= '0;
      bp1_q    <= '0;
      sw_valid <= 1'b0;
      sw_uop   <= '0;
      sw_addr  <= '0;
      bp2_q    <= '0;
      st_q     <= '0;
    end else begin
      if (in_ready) begin
        d_valid <= in_valid;
        if (in_valid) d_uop <= in_uop;
      end

      le_first <= issue;
      if (issue) begin
        le_valid <= 1'b1;
        le_uop   <= d_uop;
        le_a     <= op_a;
        le_b     <= op_b;
        le_pa    <= SR && reads_a && !a_ready;
        le_pb    <= SR && reads_b && !b_ready;
      end else begin
        if (move_le) le_valid <= 1'b0;
        if (le_pa && la_ready) begin le_a <= byp_la; le_pa <= 1'b0; end
        if (le_pb && lb_ready) begin le_b <= byp_lb; le_pb <= 1'b0; end
      end

      e2_first <= move_le;
      if (move_le) begin
        e2_valid <= 1'b1;
        e2_uop   <= le_uop;
        e2_a     <= le_a_now;
        e2_b     <= le_b_now;
        e2_mem   <= ld_rdata;
        bp1_q    <= int1_res;
      end else if (move_e2) begin
        e2_valid <= 1'b0;
      end

      sw_valid <= move_e2;
      if (move_e2) begin
        sw_uop  <= e2_uop;
        sw_addr <= e2_a;
        bp2_q   <= bp1_q;
        st_q    <= int2_res;
      end
    end
  end

  // ---------------- scoreboard ------------------------------------------------------
  // LOAD stands for the load stage of the memory path (also taken by instructions that
  // skip the cache there); STORE is marked only for instructions that write memory.
  always_comb begin
    fu_set[FU_INT1]      = issue && !on_mem_path(d_uop);
    fu_set_cnt[FU_INT1]  = op_latency(d_uop.op) - cnt_t'(1);
    fu_set[FU_LOAD]      = issue && on_mem_path(d_uop);
    fu_set_cnt[FU_LOAD]  = '0;
    fu_set[FU_INT2]      = move_le && on_mem_path(le_uop);
    fu_set_cnt[FU_INT2]  = op_latency(le_uop.op) - cnt_t'(1);
    fu_set[FU_STORE]     = move_e2 && uop_stores(e2_uop);
    fu_set_cnt[FU_STORE] = '0;
    stage_move[ST_LE]    = move_le;
    stage_move[ST_E2]    = move_e2;
    stage_move[ST_SW]    = move_sw;
  end

  w75_scoreboard u_sb (
    .clk       (clk),
    .rst_n     (rst_n),
    .fu_set    (fu_set),
    .fu_set_cnt(fu_set_cnt),
    .iss_valid (issue),
    .iss_wr    (uop_writes_reg(d_uop)),
    .iss_rd    (d_uop.ra),
    .iss_loc   (on_mem_path(d_uop) ? LOC_LOAD : LOC_INT1),
    .iss_cnt   (issue_cnt(d_uop)),
    .stage_move(stage_move),
    .regs_o    (sb_regs),
    .fus_o     (sb_fus)
  );

  assign sb_regs_o       = sb_regs;
  assign sb_fus_o        = sb_fus;
  assign ev_issue        = issue;
  assign ev_stall_data   = stall_data;
  assign ev_stall_fu     = stall_fu;
  assign ev_stall_struct = stall_struct;
  assign ev_stall_mem    = stall_mem;
  assign ev_ld_miss      = ld_miss;
  assign ev_stall_late   = late_stall;
  assign ev_loc_a        = a_loc;
  assign ev_loc_b        = b_loc;

  // A value the scoreboard calls ready at the load port must really be there.
  a_load_hit : assert property (@(posedge clk) disable iff (!rst_n)
    issue && ((need_a && a_loc == LOC_LOAD) || (need_b && b_loc == LOC_LOAD)) |-> ld_hit);

  // An operand left open in decode is caught from a place in the pipeline, never from
  // the register file (its producer is always ahead of it).
  a_late_not_rf : assert property (@(posedge clk) disable iff (!rst_n)
    le_valid && ((le_pa && la_ready && la_loc == LOC_RF) ||
                 (le_pb && lb_ready && lb_loc == LOC_RF)) |-> 1'b0);

endmodule
