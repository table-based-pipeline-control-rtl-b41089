// tb_w75_srt_divider - unsigned divides with random and corner-case operands (zero
// divisor, divisor 1, all-ones, dividend below divisor, powers of two): done must rise
// exactly in cycle DIV_LAT and stay high, and the quotient must equal a / b (all ones
// for b = 0).
module tb_w75_srt_divider;
  import w75_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  in_valid, in_first, done;
  word_t a, b, q;

  w75_srt_divider dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
                       .dividend(a), .divisor(b), .quotient(q), .done(done));

  task automatic one(word_t x, word_t y);
    automatic word_t expq = (y == 0) ? '1 : x / y;
    automatic int    c;
    @(negedge clk);
    a = x; b = y; in_valid = 1; in_first = 1;
    c = 1;
    #1;
    while (!done && c < DIV_LAT + 5) begin
      @(negedge clk); in_first = 0; c++; #1;
    end
    checks++;
    if (c != DIV_LAT || q !== expq) begin
      failures++;
      $display("ERROR %h / %h: quotient %h after %0d cycles, expected %h after %0d", x, y, q, c,
               expq, DIV_LAT);
    end
    @(negedge clk); #1;
    checks++;
    if (!done || q !== expq) begin failures++; $display("ERROR %h / %h: result not held", x, y); end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_first = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(32'd100, 32'd7);
    one(32'hffff_ffff, 32'd1);
    one(32'hffff_ffff, 32'hffff_ffff);
    one(32'd5, 32'd9);
    one(32'd12345, 32'd0);
    one(32'h8000_0000, 32'h0000_0010);
    one(32'hdead_beef, 32'h0000_0003);
    one(32'h7fff_ffff, 32'h8000_0000);
    for (int i = 0; i < 300; i++) begin
      automatic word_t x = $urandom;
      automatic word_t y = $urandom >> $urandom_range(0, 31);
      one(x, y);
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
