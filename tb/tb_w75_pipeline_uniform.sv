// tb_w75_pipeline_uniform - end-to-end test (uniform pipeline) of the w75 back end with its scoreboard.
//
// The pipeline runs in the configuration chosen by UNI / SR below (default: two
// execution paths) against a behavioural data cache
// (4-cycle misses, flushable). A sequential reference model executes the same
// instruction stream; every register write-back and every store is compared, in
// order, with the model's, and the register file and memory are compared after each
// program.
//
// Directed programs reproduce the worked examples of the design. Two-path mode:
//  * forwarding (ADD R1 R2 / SUB R4 R1 / ADD R1 R4 / XOR R1 R4): scoreboard contents
//    and bypass selections cycle by cycle;
//  * multi-cycle multiply (ADD R1 R2 / MUL R3 R1 / SUB R6 R3): counters 2,1,0, two
//    stall cycles, dependant released in cycle 4;
// Uniform mode (every instruction through load, INT2 and store):
//  * ADD R1 R2 / SUB R3 R1: without the second read B waits one cycle and takes R1
//    from INT2; with it B enters the load stage at once and catches R1 there;
//  * MUL R1 R2 / SUB R3 R1 with the second read: B holds in the load stage for two
//    cycles and catches the product in the third.
// All modes:
//  * load miss (MOV R1 *R2 / ADD R4 R1): late override stalls the dependant until
//    the 4-cycle miss is over;
//  * memory dependency (MOV R5 R1 / ADD *R1 R2 / SUB R3 *R5): the load waits three
//    cycles, while the load-op-store is in LE, E2 and SW.
// A random program then mixes all instruction forms, multiplies, divides and cache
// flushes. Every mechanism the mode has (bypass locations, data, unit, structural,
// memory and load-stage stalls, load misses, multiplies and divides on each ALU) is
// counted and must occur; those the mode cannot have must not.
module tb_w75_pipeline_uniform;
  import w75_pkg::*;

  // Configuration of the pipeline under test (must match the instance below).
  localparam bit UNI = 1'b1;   // uniform pipeline
  localparam bit SR  = 1'b0;   // second scoreboard read in the load stage

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------- DUT and cache -------------------------------------------------
  logic     in_valid, in_ready;
  uop_t     in_uop;
  logic     ld_req, ld_hit, st_req, wb_en, flush;
  word_t    ld_addr, ld_rdata, st_addr, st_wdata, wb_data;
  reg_idx_t wb_idx;
  word_t    rf_o [NREGS];
  sb_reg_t  sb_regs [NREGS];
  sb_fu_t   sb_fus [NFU];
  logic     ev_issue, ev_stall_data, ev_stall_fu, ev_stall_struct, ev_stall_mem, ev_ld_miss;
  logic     ev_stall_late;
  loc_t     ev_loc_a, ev_loc_b;

  w75_pipeline #(.UNIFORM(1'b1), .SECOND_READ(1'b0)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_uop(in_uop),
    .ld_req(ld_req), .ld_addr(ld_addr), .ld_hit(ld_hit), .ld_rdata(ld_rdata),
    .st_req(st_req), .st_addr(st_addr), .st_wdata(st_wdata),
    .wb_en(wb_en), .wb_idx(wb_idx), .wb_data(wb_data),
    .rf_o(rf_o), .sb_regs_o(sb_regs), .sb_fus_o(sb_fus),
    .ev_issue(ev_issue), .ev_stall_data(ev_stall_data), .ev_stall_fu(ev_stall_fu),
    .ev_stall_struct(ev_stall_struct), .ev_stall_mem(ev_stall_mem),
    .ev_ld_miss(ev_ld_miss), .ev_stall_late(ev_stall_late), .ev_loc_a(ev_loc_a), .ev_loc_b(ev_loc_b)
  );

  w75_dcache_model #(.WORDS(256), .LINE_WORDS(4), .MISS_LAT(4)) u_mem (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .ld_req(ld_req), .ld_addr(ld_addr), .ld_hit(ld_hit), .ld_rdata(ld_rdata),
    .st_req(st_req), .st_addr(st_addr), .st_wdata(st_wdata)
  );

  // ---------------- instruction source --------------------------------------------
  localparam int PMAX = 2048;
  uop_t prog [PMAX];
  int   plen = 0;
  int   pc = 0;

  assign in_valid = (pc < plen);
  assign in_uop   = prog[pc < PMAX ? pc : 0];

  always @(posedge clk) if (in_valid && in_ready) pc <= pc + 1;

  function automatic uop_t mk(alu_op_t op, logic dm, src_mode_t sm, int ra, int rb, word_t imm);
    uop_t u;
    u.op = op; u.dst_mem = dm; u.src_mode = sm;
    u.ra = reg_idx_t'(ra); u.rb = reg_idx_t'(rb); u.imm = imm;
    return u;
  endfunction

  // ---------------- reference model -----------------------------------------------
  word_t ref_rf [NREGS];
  word_t ref_mem [256];
  typedef struct packed { logic [2:0] idx; word_t data; } wb_rec_t;
  typedef struct packed { word_t addr; word_t data; } st_rec_t;
  wb_rec_t exp_wb [$];
  st_rec_t exp_st [$];

  function automatic word_t alu(alu_op_t op, word_t a, word_t b);
    case (op)
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      ALU_MOV: return b;
      ALU_DIV: return (b == 0) ? '1 : a / b;
      default: return a * b;
    endcase
  endfunction

  function automatic int midx(word_t a);
    return int'(a[9:2]);
  endfunction

  function automatic void ref_exec(uop_t u);
    word_t b, r, addr;
    if (!u.dst_mem) begin
      if (u.src_mode == SRC_MEM)      b = ref_mem[midx(ref_rf[u.rb])];
      else if (u.src_mode == SRC_IMM) b = u.imm;
      else                            b = ref_rf[u.rb];
      r = alu(u.op, ref_rf[u.ra], b);
      ref_rf[u.ra] = r;
      exp_wb.push_back('{idx: u.ra, data: r});
    end else begin
      addr = ref_rf[u.ra];
      b = (u.src_mode == SRC_IMM) ? u.imm : ref_rf[u.rb];
      r = alu(u.op, ref_mem[midx(addr)], b);
      ref_mem[midx(addr)] = r;
      exp_st.push_back('{addr: addr, data: r});
    end
  endfunction

  // Compare write-backs and stores in program order.
  always @(negedge clk) if (rst_n) begin
    if (wb_en) begin
      checks++;
      if (exp_wb.size() == 0) begin
        failures++; $display("ERROR unexpected write-back R%0d", wb_idx);
      end else begin
        wb_rec_t e;
        e = exp_wb.pop_front();
        if (e.idx != wb_idx || e.data != wb_data) begin
          failures++;
          $display("ERROR write-back R%0d=%h, expected R%0d=%h", wb_idx, wb_data, e.idx, e.data);
        end
      end
    end
    if (st_req) begin
      checks++;
      if (exp_st.size() == 0) begin
        failures++; $display("ERROR unexpected store");
      end else begin
        st_rec_t e;
        e = exp_st.pop_front();
        if (e.addr[9:2] != st_addr[9:2] || e.data != st_wdata) begin
          failures++;
          $display("ERROR store [%h]=%h, expected [%h]=%h", st_addr, st_wdata, e.addr, e.data);
        end
      end
    end
  end

  // ---------------- mechanism counters --------------------------------------------
  int n_byp [NLOC];
  int n_stall_data = 0, n_stall_fu = 0, n_stall_struct = 0, n_stall_mem = 0;
  int n_ld_miss = 0, n_mul_int1 = 0, n_mul_int2 = 0, n_div_int1 = 0, n_div_int2 = 0, n_issue = 0;
  int n_stall_late = 0, n_late_catch = 0;
  int cyc = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (ev_issue) begin
      n_issue++;
      // operands read in decode (with the second read some are left for later)
      if (uop_reads_a(dut.d_uop) && dut.a_ready) n_byp[ev_loc_a]++;
      if (uop_reads_b(dut.d_uop) && dut.b_ready) n_byp[ev_loc_b]++;
      if (dut.d_uop.op == ALU_MUL) begin
        if (UNI || uop_upper(dut.d_uop)) n_mul_int2++; else n_mul_int1++;
      end
      if (dut.d_uop.op == ALU_DIV) begin
        if (UNI || uop_upper(dut.d_uop)) n_div_int2++; else n_div_int1++;
      end
    end
    // operands caught by the second read
    if (dut.le_valid && dut.le_pa && dut.la_ready) begin n_byp[dut.la_loc]++; n_late_catch++; end
    if (dut.le_valid && dut.le_pb && dut.lb_ready) begin n_byp[dut.lb_loc]++; n_late_catch++; end
    if (ev_stall_late)   n_stall_late++;
    if (ev_stall_data)   n_stall_data++;
    if (ev_stall_fu)     n_stall_fu++;
    if (ev_stall_struct) n_stall_struct++;
    if (ev_stall_mem)    n_stall_mem++;
    if (ev_ld_miss)      n_ld_miss++;
  end

  // ---------------- helpers -------------------------------------------------------
  task automatic load_prog(input uop_t p [$]);
    plen = 0;
    pc   = 0;
    foreach (p[i]) begin
      prog[i] = p[i];
      ref_exec(p[i]);
    end
    @(negedge clk);
    plen = p.size();
  endtask

  // Wait until the program has entered and every expected write-back and store has
  // been seen (bounded: two divides in a row take about 70 cycles), then a few more
  // cycles so that nothing unexpected is left in flight.
  task automatic drain();
    int n;
    while (pc < plen) @(negedge clk);
    n = 0;
    while ((exp_wb.size() != 0 || exp_st.size() != 0) && n < 400) begin
      @(negedge clk); n++;
    end
    repeat (10) @(negedge clk);
  endtask

  task automatic cmp_state(string tag);
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (rf_o[r] != ref_rf[r]) begin
        failures++; $display("ERROR %s: R%0d=%h expected %h", tag, r, rf_o[r], ref_rf[r]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (u_mem.mem[i] != ref_mem[i]) begin
        failures++; $display("ERROR %s: mem[%0d]=%h expected %h", tag, i, u_mem.mem[i], ref_mem[i]);
      end
    end
    checks++;
    if (exp_wb.size() != 0 || exp_st.size() != 0) begin
      failures++; $display("ERROR %s: %0d write-backs / %0d stores missing", tag, exp_wb.size(), exp_st.size());
    end
  endtask

  // Expected scoreboard contents: registers/units not named are RF/0 and free.
  sb_reg_t e_reg [NREGS];
  sb_fu_t  e_fu  [NFU];

  task automatic exp_clear();
    for (int r = 0; r < NREGS; r++) e_reg[r] = '{loc: LOC_RF, cnt: '0};
    for (int f = 0; f < NFU; f++)   e_fu[f]  = '{busy: 1'b0, cnt: '0};
  endtask

  task automatic check_table(string tag);
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (sb_regs[r] != e_reg[r]) begin
        failures++;
        $display("ERROR %s: R%0d is %s/%0d, expected %s/%0d", tag, r, sb_regs[r].loc.name(),
                 sb_regs[r].cnt, e_reg[r].loc.name(), e_reg[r].cnt);
      end
    end
    for (int f = 0; f < NFU; f++) begin
      checks++;
      if (sb_fus[f] != e_fu[f]) begin
        failures++;
        $display("ERROR %s: unit %0d is %0d/%0d, expected %0d/%0d", tag, f, sb_fus[f].busy,
                 sb_fus[f].cnt, e_fu[f].busy, e_fu[f].cnt);
      end
    end
  endtask

  task automatic check_bit(string tag, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("ERROR %s: got %0b expected %0b", tag, got, exp);
    end
  endtask

  task automatic check_loc(string tag, loc_t got, loc_t exp);
    checks++;
    if (got != exp) begin
      failures++; $display("ERROR %s: got %s expected %s", tag, got.name(), exp.name());
    end
  endtask

  // Start a program and return at the negedge of the cycle in which its first
  // instruction leaves decode (cycle 0 of the worked examples).
  task automatic start_and_sync(input uop_t p [$]);
    load_prog(p);
    while (!ev_issue) @(negedge clk);
  endtask

  // ---------------- main sequence ---------------------------------------------------
  initial begin
    uop_t p [$];
    int t;
    flush = 1'b0;
    for (int i = 0; i < NLOC; i++) n_byp[i] = 0;
    for (int r = 0; r < NREGS; r++) ref_rf[r] = '0;
    for (int i = 0; i < 256; i++) begin
      ref_mem[i] = 32'h1000_0000 + 32'(i) * 32'h0101;
      u_mem.mem[i] = ref_mem[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // register initial values: R0..R7 = small addresses / values
    p = {};
    for (int r = 0; r < NREGS; r++) p.push_back(mk(ALU_MOV, 0, SRC_IMM, r, 0, 32'(16 * r + 4)));
    load_prog(p); drain(); cmp_state("init");

    if (!UNI) begin
    // ---- forwarding example ----
    p = {mk(ALU_ADD, 0, SRC_REG, 1, 2, 0), mk(ALU_SUB, 0, SRC_REG, 4, 1, 0),
         mk(ALU_ADD, 0, SRC_REG, 1, 4, 0), mk(ALU_XOR, 0, SRC_REG, 1, 4, 0)};
    start_and_sync(p);
    exp_clear(); check_table("fwd c0");
    @(negedge clk);                          // cycle 1: B in decode
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[1] = '{LOC_INT1, 0};
    check_table("fwd c1"); check_bit("fwd c1 issue", ev_issue, 1'b1);
    check_loc("fwd c1 B.a", ev_loc_a, LOC_RF); check_loc("fwd c1 B.b", ev_loc_b, LOC_INT1);
    @(negedge clk);                          // cycle 2: C in decode
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[1] = '{LOC_BP1, 0}; e_reg[4] = '{LOC_INT1, 0};
    check_table("fwd c2"); check_bit("fwd c2 issue", ev_issue, 1'b1);
    check_loc("fwd c2 C.a", ev_loc_a, LOC_BP1); check_loc("fwd c2 C.b", ev_loc_b, LOC_INT1);
    @(negedge clk);                          // cycle 3: D in decode
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[1] = '{LOC_INT1, 0}; e_reg[4] = '{LOC_BP1, 0};
    check_table("fwd c3"); check_bit("fwd c3 issue", ev_issue, 1'b1);
    check_loc("fwd c3 D.a", ev_loc_a, LOC_INT1); check_loc("fwd c3 D.b", ev_loc_b, LOC_BP1);
    drain(); cmp_state("forwarding");

    // ---- multi-cycle multiply example ----
    p = {mk(ALU_ADD, 0, SRC_REG, 1, 2, 0), mk(ALU_MUL, 0, SRC_REG, 3, 1, 0),
         mk(ALU_SUB, 0, SRC_REG, 6, 3, 0)};
    start_and_sync(p);
    @(negedge clk);                          // cycle 1
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[1] = '{LOC_INT1, 0};
    check_table("mul c1"); check_bit("mul c1 issue", ev_issue, 1'b1);
    @(negedge clk);                          // cycle 2
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 2}; e_reg[1] = '{LOC_BP1, 0}; e_reg[3] = '{LOC_INT1, 2};
    check_table("mul c2"); check_bit("mul c2 stall", ev_issue, 1'b0);
    @(negedge clk);                          // cycle 3
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 1}; e_reg[1] = '{LOC_BP2, 0}; e_reg[3] = '{LOC_INT1, 1};
    check_table("mul c3"); check_bit("mul c3 stall", ev_issue, 1'b0);
    @(negedge clk);                          // cycle 4: counters reach zero, C leaves
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[3] = '{LOC_INT1, 0};
    check_table("mul c4"); check_bit("mul c4 issue", ev_issue, 1'b1);
    check_loc("mul c4 C.b", ev_loc_b, LOC_INT1);
    @(negedge clk);                          // cycle 5
    exp_clear(); e_fu[FU_INT1] = '{1'b1, 0}; e_reg[3] = '{LOC_BP1, 0}; e_reg[6] = '{LOC_INT1, 0};
    check_table("mul c5");
    drain(); cmp_state("multiply");
    end

    if (UNI) begin
    // ---- uniform pipeline: dependent pair ----
    p = {mk(ALU_ADD, 0, SRC_REG, 1, 2, 0), mk(ALU_SUB, 0, SRC_REG, 3, 1, 0)};
    start_and_sync(p);
    exp_clear(); check_table("uni c0");
    @(negedge clk);                          // cycle 1: A in the load stage
    exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_reg[1] = '{LOC_LOAD, 1};
    if (!SR) begin
      check_table("uni c1");
      check_bit("uni c1 B waits", ev_stall_data, 1'b1);
      @(negedge clk);                        // cycle 2: A in INT2, B takes R1 from it
      exp_clear(); e_fu[FU_INT2] = '{1'b1, 0}; e_reg[1] = '{LOC_INT2, 0};
      check_table("uni c2"); check_bit("uni c2 issue", ev_issue, 1'b1);
      check_loc("uni c2 B.b", ev_loc_b, LOC_INT2);
      @(negedge clk);                        // cycle 3: B in the load stage, A in SW
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0};   // A stores nothing: STORE stays free
      e_reg[1] = '{LOC_ST, 0}; e_reg[3] = '{LOC_LOAD, 1};
      check_table("uni c3");
    end else begin
      check_table("uni c1");
      check_bit("uni c1 B enters the load stage", ev_issue, 1'b1);
      @(negedge clk);                        // cycle 2: B in the load stage catches R1
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_fu[FU_INT2] = '{1'b1, 0};
      e_reg[1] = '{LOC_INT2, 0}; e_reg[3] = '{LOC_LOAD, 1};
      check_table("uni c2");
      check_bit("uni c2 B open", dut.le_pb, 1'b1);
      check_bit("uni c2 R1 ready", dut.lb_ready, 1'b1);
      check_loc("uni c2 R1 from", dut.lb_loc, LOC_INT2);
      check_bit("uni c2 no hold", ev_stall_late, 1'b0);
    end
    drain(); cmp_state("uniform pair");

    if (SR) begin
      // ---- second read with a multiply producer ----
      p = {mk(ALU_MUL, 0, SRC_REG, 1, 2, 0), mk(ALU_SUB, 0, SRC_REG, 3, 1, 0)};
      start_and_sync(p);
      @(negedge clk);                        // cycle 1: A in the load stage, B issues
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_reg[1] = '{LOC_LOAD, 3};
      check_table("srmul c1"); check_bit("srmul c1 issue", ev_issue, 1'b1);
      @(negedge clk);                        // cycle 2: A multiplies, B holds
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_fu[FU_INT2] = '{1'b1, 2};
      e_reg[1] = '{LOC_INT2, 2}; e_reg[3] = '{LOC_LOAD, 1};
      check_table("srmul c2"); check_bit("srmul c2 hold", ev_stall_late, 1'b1);
      @(negedge clk);                        // cycle 3
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_fu[FU_INT2] = '{1'b1, 1};
      e_reg[1] = '{LOC_INT2, 1}; e_reg[3] = '{LOC_LOAD, 1};
      check_table("srmul c3"); check_bit("srmul c3 hold", ev_stall_late, 1'b1);
      @(negedge clk);                        // cycle 4: product ready, B catches it
      exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_fu[FU_INT2] = '{1'b1, 0};
      e_reg[1] = '{LOC_INT2, 0}; e_reg[3] = '{LOC_LOAD, 1};
      check_table("srmul c4"); check_bit("srmul c4 go", ev_stall_late, 1'b0);
      check_bit("srmul c4 catch", dut.lb_ready, 1'b1);
      drain(); cmp_state("second read multiply");
    end
    end

    // ---- load miss example ----
    flush = 1'b1; @(negedge clk); flush = 1'b0;
    p = {mk(ALU_MOV, 0, SRC_MEM, 1, 2, 0), mk(ALU_ADD, 0, SRC_REG, 4, 1, 0)};
    start_and_sync(p);
    @(negedge clk);                          // cycle 1: A in LE and missing, B in decode
    exp_clear(); e_fu[FU_LOAD] = '{1'b1, 0}; e_reg[1] = '{LOC_LOAD, 0};
    check_table("miss c1");
    check_bit("miss c1 miss", ev_ld_miss, 1'b1);
    check_bit("miss c1 B stalls on data", ev_stall_data, !SR);
    t = 0;
    while (!ev_issue && t < 20) begin @(negedge clk); t++; end
    check_loc("miss B.b from load port", ev_loc_b, LOC_LOAD);
    checks++;
    if (t != 4) begin failures++; $display("ERROR miss: B released after %0d more cycles, expected 4", t); end
    drain(); cmp_state("load miss");

    // ---- memory dependency example (the line at [R1] is loaded first so B hits) ----
    p = {mk(ALU_MOV, 0, SRC_MEM, 0, 1, 0)};
    load_prog(p); drain();
    p = {mk(ALU_MOV, 0, SRC_REG, 5, 1, 0), mk(ALU_ADD, 1, SRC_REG, 1, 2, 0),
         mk(ALU_SUB, 0, SRC_MEM, 3, 5, 0)};
    t = n_stall_mem;
    load_prog(p); drain(); cmp_state("memory dependency");
    checks++;
    if (n_stall_mem - t != 3) begin
      failures++; $display("ERROR memdep: %0d stall cycles, expected 3", n_stall_mem - t);
    end

    // ---- random program ----
    p = {};
    for (int i = 0; i < 1500; i++) begin
      automatic int unsigned k = $urandom_range(0, 99);
      automatic alu_op_t op = alu_op_t'($urandom_range(0, 7));
      automatic int ra = $urandom_range(0, 7);
      automatic int rb = $urandom_range(0, 7);
      automatic word_t imm = $urandom;
      if (k < 35)      p.push_back(mk(op, 0, SRC_REG, ra, rb, 0));
      else if (k < 45) p.push_back(mk(op, 0, SRC_IMM, ra, rb, imm));
      else if (k < 58) p.push_back(mk(ALU_MOV, 0, SRC_MEM, ra, rb, 0));
      else if (k < 72) p.push_back(mk(op, 0, SRC_MEM, ra, rb, 0));
      else if (k < 84) p.push_back(mk(ALU_MOV, 1, SRC_REG, ra, rb, 0));
      else if (k < 88) p.push_back(mk(ALU_MOV, 1, SRC_IMM, ra, rb, imm));
      else             p.push_back(mk(op, 1, SRC_REG, ra, rb, 0));
    end
    load_prog(p);
    while (pc < plen) begin
      @(negedge clk);
      flush = ($urandom_range(0, 59) == 0);
    end
    flush = 1'b0;
    drain(); cmp_state("random");

    // ---- every mechanism of the mode must have happened, no other ----
    for (int l = 0; l < NLOC; l++) begin
      automatic bit lower = (l == LOC_INT1 || l == LOC_BP1 || l == LOC_BP2);
      checks++;
      if (UNI && lower && n_byp[l] != 0) begin
        failures++; $display("ERROR operand taken from %s in uniform mode", loc_t'(l));
      end
      if (!(UNI && lower) && n_byp[l] == 0) begin
        failures++; $display("ERROR no operand taken from %s", loc_t'(l));
      end
    end
    checks += 10;
    if ((n_div_int1 == 0) != UNI) begin failures++; $display("ERROR divides on INT1: %0d", n_div_int1); end
    if ((n_mul_int1 == 0) != UNI) begin failures++; $display("ERROR multiplies on INT1: %0d", n_mul_int1); end
    if (n_div_int2 == 0)     begin failures++; $display("ERROR no divide on INT2"); end
    if (n_mul_int2 == 0)     begin failures++; $display("ERROR no multiply on INT2"); end
    if (n_stall_data == 0)   begin failures++; $display("ERROR no data stall"); end
    if (!UNI && n_stall_fu == 0) begin failures++; $display("ERROR no unit-busy stall"); end
    if (n_stall_struct == 0) begin failures++; $display("ERROR no structural stall"); end
    if (n_stall_mem == 0)    begin failures++; $display("ERROR no memory-dependency stall"); end
    if (n_ld_miss == 0)      begin failures++; $display("ERROR no load miss"); end
    if ((n_stall_late == 0 || n_late_catch == 0) == SR) begin
      failures++; $display("ERROR load-stage holds %0d, catches %0d", n_stall_late, n_late_catch);
    end
    $display("issued=%0d cycles=%0d bypass RF/INT1/BP1/BP2/LOAD/INT2/ST=%0d/%0d/%0d/%0d/%0d/%0d/%0d",
             n_issue, cyc, n_byp[0], n_byp[1], n_byp[2], n_byp[3], n_byp[4], n_byp[5], n_byp[6]);
    $display("stall cycles data=%0d unit=%0d structural=%0d memory=%0d, miss cycles=%0d",
             n_stall_data, n_stall_fu, n_stall_struct, n_stall_mem, n_ld_miss);
    $display("mul INT1=%0d INT2=%0d, div INT1=%0d INT2=%0d", n_mul_int1, n_mul_int2, n_div_int1, n_div_int2);
    $display("load-stage holds=%0d catches=%0d", n_stall_late, n_late_catch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
