// tb_w75_scoreboard - drives the table's update inputs the way the pipeline does and
// compares the whole table after every edge with hand-worked contents:
//  1. ADD R1 / MUL R3,R1 / SUB R6,R3 on INT1: unit counter 2,1,0, R3 at INT1 with
//     2,1,0, then R3 and R6 walking INT1 -> BP1 -> BP2 -> RF and INT1 freed;
//  2. a load-multiply into R2 that misses for one cycle: its counter freezes at 3
//     while the load makes no progress, then LOAD -> INT2 (2,1,0) -> ST -> RF, with
//     the LOAD, INT2 and STORE columns following;
//  3. two back-to-back writers of R1: the column always describes the newest one.
module tb_w75_scoreboard;
  import w75_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic     fu_set [NFU];
  cnt_t     fu_set_cnt [NFU];
  logic     iss_valid, iss_wr;
  reg_idx_t iss_rd;
  loc_t     iss_loc;
  cnt_t     iss_cnt;
  logic     stage_move [NSTAGE];
  sb_reg_t  regs [NREGS];
  sb_fu_t   fus [NFU];

  w75_scoreboard dut (.clk(clk), .rst_n(rst_n), .fu_set(fu_set), .fu_set_cnt(fu_set_cnt),
                      .iss_valid(iss_valid), .iss_wr(iss_wr), .iss_rd(iss_rd),
                      .iss_loc(iss_loc), .iss_cnt(iss_cnt), .stage_move(stage_move),
                      .regs_o(regs), .fus_o(fus));

  sb_reg_t e_reg [NREGS];
  sb_fu_t  e_fu [NFU];

  task automatic idle_inputs();
    for (int f = 0; f < NFU; f++) begin fu_set[f] = 0; fu_set_cnt[f] = '0; end
    for (int s = 0; s < NSTAGE; s++) stage_move[s] = 0;
    iss_valid = 0; iss_wr = 0; iss_rd = '0; iss_loc = LOC_RF; iss_cnt = '0;
  endtask

  task automatic exp_clear();
    for (int r = 0; r < NREGS; r++) e_reg[r] = '{loc: LOC_RF, cnt: '0};
    for (int f = 0; f < NFU; f++)   e_fu[f]  = '{busy: 1'b0, cnt: '0};
  endtask

  task automatic issue_to(fu_t f, cnt_t fcnt, int rd, loc_t l, cnt_t c);
    fu_set[f] = 1; fu_set_cnt[f] = fcnt;
    iss_valid = 1; iss_wr = 1; iss_rd = reg_idx_t'(rd); iss_loc = l; iss_cnt = c;
  endtask

  // apply the inputs at the edge, then compare the table
  task automatic edge_and_check(string tag);
    @(posedge clk);
    #1;
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (regs[r] != e_reg[r]) begin
        failures++;
        $display("ERROR %s: R%0d %s/%0d expected %s/%0d", tag, r, regs[r].loc.name(), regs[r].cnt,
                 e_reg[r].loc.name(), e_reg[r].cnt);
      end
    end
    for (int f = 0; f < NFU; f++) begin
      checks++;
      if (fus[f] != e_fu[f]) begin
        failures++;
        $display("ERROR %s: unit %0d %0d/%0d expected %0d/%0d", tag, f, fus[f].busy, fus[f].cnt,
                 e_fu[f].busy, e_fu[f].cnt);
      end
    end
    idle_inputs();
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1: multiply on INT1 ----
    issue_to(FU_INT1, 0, 1, LOC_INT1, 0);                          // ADD R1 leaves decode
    exp_clear(); e_fu[FU_INT1] = '{1, 0}; e_reg[1] = '{LOC_INT1, 0};
    edge_and_check("s1 c1");
    issue_to(FU_INT1, 2, 3, LOC_INT1, 2); stage_move[ST_LE] = 1;   // MUL R3 leaves decode
    exp_clear(); e_fu[FU_INT1] = '{1, 2}; e_reg[1] = '{LOC_BP1, 0}; e_reg[3] = '{LOC_INT1, 2};
    edge_and_check("s1 c2");
    stage_move[ST_E2] = 1;
    exp_clear(); e_fu[FU_INT1] = '{1, 1}; e_reg[1] = '{LOC_BP2, 0}; e_reg[3] = '{LOC_INT1, 1};
    edge_and_check("s1 c3");
    stage_move[ST_SW] = 1;
    exp_clear(); e_fu[FU_INT1] = '{1, 0}; e_reg[3] = '{LOC_INT1, 0};
    edge_and_check("s1 c4");
    issue_to(FU_INT1, 0, 6, LOC_INT1, 0); stage_move[ST_LE] = 1;   // SUB R6 leaves decode
    exp_clear(); e_fu[FU_INT1] = '{1, 0}; e_reg[3] = '{LOC_BP1, 0}; e_reg[6] = '{LOC_INT1, 0};
    edge_and_check("s1 c5");
    stage_move[ST_LE] = 1; stage_move[ST_E2] = 1;
    exp_clear(); e_reg[3] = '{LOC_BP2, 0}; e_reg[6] = '{LOC_BP1, 0};
    edge_and_check("s1 c6");
    stage_move[ST_E2] = 1; stage_move[ST_SW] = 1;
    exp_clear(); e_reg[6] = '{LOC_BP2, 0};
    edge_and_check("s1 c7");
    stage_move[ST_SW] = 1;
    exp_clear();
    edge_and_check("s1 c8");

    // ---- 2: load-multiply into R2 with a one-cycle miss ----
    issue_to(FU_LOAD, 0, 2, LOC_LOAD, 3);
    exp_clear(); e_fu[FU_LOAD] = '{1, 0}; e_reg[2] = '{LOC_LOAD, 3};
    edge_and_check("s2 c1");
    // miss: nothing moves
    edge_and_check("s2 c2 (miss)");
    stage_move[ST_LE] = 1; fu_set[FU_INT2] = 1; fu_set_cnt[FU_INT2] = 2;
    exp_clear(); e_fu[FU_INT2] = '{1, 2}; e_reg[2] = '{LOC_INT2, 2};
    edge_and_check("s2 c3");
    exp_clear(); e_fu[FU_INT2] = '{1, 1}; e_reg[2] = '{LOC_INT2, 1};
    edge_and_check("s2 c4");
    exp_clear(); e_fu[FU_INT2] = '{1, 0}; e_reg[2] = '{LOC_INT2, 0};
    edge_and_check("s2 c5");
    stage_move[ST_E2] = 1; fu_set[FU_STORE] = 1;
    exp_clear(); e_fu[FU_STORE] = '{1, 0}; e_reg[2] = '{LOC_ST, 0};
    edge_and_check("s2 c6");
    stage_move[ST_SW] = 1;
    exp_clear();
    edge_and_check("s2 c7");

    // ---- 3: newest writer wins ----
    issue_to(FU_INT1, 0, 1, LOC_INT1, 0);
    exp_clear(); e_fu[FU_INT1] = '{1, 0}; e_reg[1] = '{LOC_INT1, 0};
    edge_and_check("s3 c1");
    issue_to(FU_LOAD, 0, 1, LOC_LOAD, 1); stage_move[ST_LE] = 1;
    // the INT1 column is freed at this edge because the ADD leaves LE
    exp_clear(); e_fu[FU_LOAD] = '{1, 0}; e_reg[1] = '{LOC_LOAD, 1};
    edge_and_check("s3 c2");
    stage_move[ST_LE] = 1; stage_move[ST_E2] = 1; fu_set[FU_INT2] = 1;
    exp_clear(); e_fu[FU_INT2] = '{1, 0}; e_reg[1] = '{LOC_INT2, 0};
    edge_and_check("s3 c3");
    stage_move[ST_E2] = 1; stage_move[ST_SW] = 1; fu_set[FU_STORE] = 1;
    exp_clear(); e_fu[FU_STORE] = '{1, 0}; e_reg[1] = '{LOC_ST, 0};
    edge_and_check("s3 c4");
    stage_move[ST_SW] = 1;
    exp_clear();
    edge_and_check("s3 c5");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
