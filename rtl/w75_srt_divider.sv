// w75_srt_divider - radix-2 SRT divider for unsigned XLEN-bit division, the
// multi-cycle divide inside each w75 ALU.
//
// How it works: the divisor is first normalised (shifted left by its leading-zero
// count lz so its top bit is set, D in [2^(XLEN-1), 2^XLEN)) and the dividend shifted by
// the same amount. Each of the XLEN iterations doubles the partial remainder r, brings
// in the next dividend bit and picks a quotient digit from {-1, 0, +1} by looking only
// at the top bits of r: +1 if r >= 2^(XLEN-1) (half of the smallest D), -1 if
// r < -2^(XLEN-1), 0 otherwise; then r -= digit * D. This keeps r in [-D, D), so no
// full-width comparison is needed to choose a digit. Positive and negative digits are
// collected in two registers; in the last cycle the quotient is their difference,
// minus one if the final remainder is negative.
//
// Timing: the operands must be held while the instruction is in the stage. Cycle 1
// (in_first) normalises and loads, cycles 2..XLEN+1 iterate, and in cycle XLEN+2
// (DIV_LAT = 34 for 32 bits) done rises with the quotient; both then hold. A zero
// divisor gives an all-ones quotient.
//
// That division is a multi-cycle SRT operation present in both ALUs follows the notes
// this design is built from; the radix, the unsigned operands, the latency and the
// divide-by-zero result are this design's own choices.
module w75_srt_divider
  import w75_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,   // a divide is in the stage
  input  logic  in_first,   // its first cycle there
  input  word_t dividend,
  input  word_t divisor,
  output word_t quotient,
  output logic  done
);

  localparam int unsigned LZW = $clog2(XLEN + 1);
  localparam int unsigned RW  = XLEN + 2;              // signed partial remainder width
  localparam int unsigned SW  = $clog2(XLEN + 1);

  typedef logic signed [RW-1:0] rem_t;

  logic [LZW-1:0]   lz;
  logic [2*XLEN-1:0] x_norm;
  word_t            d_norm;
  rem_t             r_q, r_sh, r_next, d_ext;
  word_t            d_q, xlo_q, qp_q, qn_q;
  logic [SW-1:0]    step_q;
  logic             q_pos, q_neg;

  // leading-zero count of the divisor
  always_comb begin
    lz = LZW'(XLEN);
    for (int i = 0; i < XLEN; i++)
      if (divisor[i]) lz = LZW'(XLEN - 1 - i);
  end

  assign d_norm = divisor << lz;
  assign x_norm = {{XLEN{1'b0}}, dividend} << lz;

  // one SRT step
  assign d_ext  = rem_t'({2'b00, d_q});
  assign r_sh   = (r_q <<< 1) | rem_t'(xlo_q[XLEN-1]);
  // digit selection from the three top bits (|r_sh| < 2^(XLEN+1) always)
  assign q_pos  = !r_sh[RW-1] && (r_sh[RW-2] || r_sh[RW-3]);   // r_sh >=  2^(XLEN-1)
  assign q_neg  =  r_sh[RW-1] && !(r_sh[RW-2] && r_sh[RW-3]);  // r_sh <  -2^(XLEN-1)
  assign r_next = q_pos ? r_sh - d_ext : (q_neg ? r_sh + d_ext : r_sh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      d_q    <= '0;
      xlo_q  <= '0;
      qp_q   <= '0;
      qn_q   <= '0;
      step_q <= '0;
    end else if (in_valid && in_first) begin
      r_q    <= rem_t'({2'b00, x_norm[2*XLEN-1:XLEN]});
      d_q    <= d_norm;
      xlo_q  <= x_norm[XLEN-1:0];
      qp_q   <= '0;
      qn_q   <= '0;
      step_q <= '0;
    end else if (in_valid && 32'(step_q) < XLEN) begin
      r_q    <= r_next;
      xlo_q  <= xlo_q << 1;
      qp_q   <= {qp_q[XLEN-2:0], q_pos};
      qn_q   <= {qn_q[XLEN-2:0], q_neg};
      step_q <= step_q + SW'(1);
    end
  end

  assign done     = in_valid && !in_first && (32'(step_q) == XLEN);
  assign quotient = (divisor == '0) ? '1
                  : (qp_q - qn_q - ((r_q < 0) ? word_t'(1) : word_t'(0)));

endmodule
