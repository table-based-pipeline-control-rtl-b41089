// tb_w75_issue_logic - random decode-stage situations: the instruction may leave
// decode only if the operands it needs now are ready, its first unit (INT1, or LOAD
// for the memory path) is free next cycle, LE is free and no memory dependency holds;
// each stall reason is checked on its own.
module tb_w75_issue_logic;
  import w75_pkg::*;

  int checks = 0;
  int failures = 0;

  logic   d_valid, a_ready, b_ready, le_free, mem_stall, need_a, need_b, use_load;
  logic   issue, stall_data, stall_fu, stall_struct, stall_mem;
  sb_fu_t fus [NFU];

  w75_issue_logic dut (.d_valid(d_valid), .need_a(need_a), .need_b(need_b), .use_load(use_load),
                       .a_ready(a_ready), .b_ready(b_ready),
                       .fus(fus), .le_free(le_free), .mem_stall(mem_stall), .issue(issue),
                       .stall_data(stall_data), .stall_fu(stall_fu),
                       .stall_struct(stall_struct), .stall_mem(stall_mem));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic logic e_data, e_fu, e_issue;
      automatic int   first;
      d_valid  = $urandom_range(0, 7) != 0;
      need_a   = $urandom_range(0, 1) == 1;
      need_b   = $urandom_range(0, 1) == 1;
      use_load = $urandom_range(0, 1) == 1;
      a_ready = $urandom_range(0, 3) != 0;
      b_ready = $urandom_range(0, 3) != 0;
      le_free = $urandom_range(0, 3) != 0;
      mem_stall = $urandom_range(0, 3) == 0;
      for (int f = 0; f < NFU; f++) begin
        fus[f].busy = $urandom_range(0, 1) == 1;
        fus[f].cnt  = ($urandom_range(0, 1) == 1) ? cnt_t'($urandom_range(1, 3)) : '0;
      end
      #1;
      first    = use_load ? 2 : 0;    // LOAD column or INT1 column
      e_data   = d_valid && ((need_a && !a_ready) || (need_b && !b_ready));
      e_fu     = d_valid && fus[first].busy && fus[first].cnt != 0;
      e_issue  = d_valid && !e_data && !e_fu && le_free && !mem_stall;
      checks++;
      if (issue !== e_issue || stall_data !== e_data || stall_fu !== e_fu ||
          stall_struct !== (d_valid && !le_free) || stall_mem !== (d_valid && mem_stall)) begin
        failures++;
        $display("ERROR case %0d: issue=%0b exp %0b data=%0b exp %0b fu=%0b exp %0b", i,
                 issue, e_issue, stall_data, e_data, stall_fu, e_fu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
