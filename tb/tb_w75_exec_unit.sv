// tb_w75_exec_unit - checks the INT1/INT2 ALU: single-cycle results for random operands,
// the three-cycle multiply and the DIV_LAT-cycle divide (done only in the last cycle,
// correct result, result held while the instruction stays in the stage).
module tb_w75_exec_unit;
  import w75_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    in_valid, in_first, done;
  alu_op_t op;
  word_t   a, b, result;

  w75_exec_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
                     .op(op), .a(a), .b(b), .result(result), .done(done));

  function automatic word_t model(alu_op_t o, word_t x, word_t y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_MOV: return y;
      ALU_DIV: return (y == 0) ? '1 : x / y;
      default: return x * y;
    endcase
  endfunction

  task automatic expect_out(string tag, logic d, word_t r);
    checks++;
    if (done !== d || (d && result !== r)) begin
      failures++;
      $display("ERROR %s op=%s a=%h b=%h: done=%0b result=%h, expected done=%0b result=%h",
               tag, op.name(), a, b, done, result, d, r);
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; op = ALU_ADD; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = 1;
      op = alu_op_t'($urandom_range(0, 7));
      a  = (i < 8) ? 32'hffff_ffff : $urandom;
      b  = (i < 8) ? 32'(i) * 32'h1234_5679 : $urandom;
      #1;
      if (op != ALU_MUL && op != ALU_DIV) begin
        expect_out("single", 1'b1, model(op, a, b));
      end else begin
        for (int c = 1; c < ((op == ALU_MUL) ? MUL_LAT : DIV_LAT); c++) begin
          expect_out("multi-cycle busy", 1'b0, '0);
          @(negedge clk); in_first = 0; #1;
        end
        expect_out("multi-cycle last", 1'b1, model(op, a, b));
        // held for two more cycles in the stage: result must stay
        repeat (2) begin @(negedge clk); #1; expect_out("multi-cycle held", 1'b1, model(op, a, b)); end
      end
    end
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
