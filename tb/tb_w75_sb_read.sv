// tb_w75_sb_read - random scoreboard tables: the port must return the location and
// counter of the addressed register, replace the counter by the "infinity" value only
// for a LOAD location while the load misses, and report ready exactly for counter 0.
module tb_w75_sb_read;
  import w75_pkg::*;

  int checks = 0;
  int failures = 0;

  sb_reg_t  regs [NREGS];
  reg_idx_t idx;
  logic     ld_miss, ready;
  loc_t     loc;
  cnt_t     cnt;

  w75_sb_read dut (.regs(regs), .idx(idx), .ld_miss(ld_miss), .loc(loc), .cnt(cnt), .ready(ready));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic cnt_t  ecnt;
      for (int r = 0; r < NREGS; r++) begin
        regs[r].loc = loc_t'($urandom_range(0, NLOC - 1));
        regs[r].cnt = ($urandom_range(0, 1) == 0) ? '0 : cnt_t'($urandom_range(0, 3));
      end
      idx     = reg_idx_t'($urandom_range(0, NREGS - 1));
      ld_miss = $urandom_range(0, 1) == 1;
      #1;
      ecnt = regs[idx].cnt;
      if (regs[idx].loc == LOC_LOAD && ld_miss) ecnt = CNT_INF;
      checks++;
      if (loc !== regs[idx].loc || cnt !== ecnt || ready !== (ecnt == 0)) begin
        failures++;
        $display("ERROR R%0d %s/%0d miss=%0b: got %s/%0d ready=%0b", idx, regs[idx].loc.name(),
                 regs[idx].cnt, ld_miss, loc.name(), cnt, ready);
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
