// w75_exec_unit - integer ALU used twice in the w75 back end: as INT1 in the Load/Exec1
// stage and as INT2 in the Exec2 stage.
//
// Single-cycle operations (ADD, SUB, AND, OR, XOR, MOV) give their result combinationally
// in the cycle the instruction sits in the stage. MUL takes MUL_LAT cycles: the unit
// multiplies the first operand by one slice of ceil(XLEN/MUL_LAT) bits of the second
// operand per cycle, accumulates the shifted partial products, and presents the full
// product combinationally in the last of those cycles. DIV (unsigned) runs the radix-2
// SRT divider w75_srt_divider and takes DIV_LAT cycles. The operands must stay constant
// while the instruction is in the stage (they come from the stage latch).
//
// Interface: in_valid says an instruction is in the stage, in_first marks its first
// cycle there. done is high in every cycle in which result holds the final value; after
// the last multiply step it stays high while the instruction is held in the stage.
//
// That both ALUs must multiply and divide, the SRT divider and the three-cycle multiply
// latency follow the notes this design is built from; the slice-per-cycle multiplier,
// the divide latency and the operation set are this design's own choices.
module w75_exec_unit
  import w75_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  alu_op_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    done
);

  localparam int unsigned CH   = (XLEN + LAT - 1) / LAT;  // multiplier bits per cycle
  localparam int unsigned SW_W = $clog2(LAT + 1);

  logic [SW_W-1:0] step_q, step;
  word_t           acc_q, acc_base, partial, mul_sum, b_shift;
  logic [CH-1:0]   chunk;
  logic            last_step;
  word_t           div_q;
  logic            div_done;

  w75_srt_divider u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid && op == ALU_DIV),
    .in_first(in_first),
    .dividend(a),
    .divisor (b),
    .quotient(div_q),
    .done    (div_done)
  );

  assign step      = in_first ? '0 : step_q;
  assign acc_base  = in_first ? '0 : acc_q;
  assign b_shift   = b >> (32'(step) * CH);
  assign chunk     = b_shift[CH-1:0];
  assign partial   = word_t'(a * {{(XLEN-CH){1'b0}}, chunk}) << (32'(step) * CH);
  assign mul_sum   = acc_base + partial;
  assign last_step = (32'(step) == LAT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= '0;
      acc_q  <= '0;
    end else if (in_valid && op == ALU_MUL && !last_step) begin
      step_q <= step + SW_W'(1);
      acc_q  <= mul_sum;
    end
  end

  always_comb begin
    done = 1'b1;
    unique case (op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      ALU_MOV: result = b;
      ALU_MUL: begin
        result = mul_sum;
        done   = last_step;
      end
      ALU_DIV: begin
        result = div_q;
        done   = div_done;
      end
      default: result = '0;
    endcase
  end

endmodule
