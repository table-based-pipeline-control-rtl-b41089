// tb_w75_regfile - random writes and reads of R0-R7 against an array model; checks
// reset to zero and that a write becomes visible after the clock edge.
module tb_w75_regfile;
  import w75_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  reg_idx_t ra_idx, rb_idx, w_idx;
  word_t    ra_data, rb_data, w_data;
  logic     we;
  word_t    regs_o [NREGS];
  word_t    m [NREGS];

  w75_regfile dut (.clk(clk), .rst_n(rst_n), .ra_idx(ra_idx), .ra_data(ra_data),
                   .rb_idx(rb_idx), .rb_data(rb_data), .we(we), .w_idx(w_idx),
                   .w_data(w_data), .regs_o(regs_o));

  initial begin
    we = 0; ra_idx = 0; rb_idx = 0; w_idx = 0; w_data = 0;
    for (int r = 0; r < NREGS; r++) m[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ra_idx = reg_idx_t'($urandom_range(0, NREGS - 1));
      rb_idx = reg_idx_t'($urandom_range(0, NREGS - 1));
      #1;
      checks += 2;
      if (ra_data !== m[ra_idx]) begin failures++; $display("ERROR port A R%0d=%h exp %h", ra_idx, ra_data, m[ra_idx]); end
      if (rb_data !== m[rb_idx]) begin failures++; $display("ERROR port B R%0d=%h exp %h", rb_idx, rb_data, m[rb_idx]); end
      checks++;
      if (regs_o[i % NREGS] !== m[i % NREGS]) begin failures++; $display("ERROR regs_o[%0d]", i % NREGS); end
      we     = ($urandom_range(0, 2) != 0);
      w_idx  = reg_idx_t'($urandom_range(0, NREGS - 1));
      w_data = $urandom;
      @(posedge clk);
      if (we) m[w_idx] = w_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
