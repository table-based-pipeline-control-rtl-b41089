// w75_regfile - the integer register file R0-R7.
//
// Two combinational read ports serve the instruction in Decode/RF read; one write port,
// written on the rising clock edge, serves the instruction leaving Store/Write-back. No
// write-to-read bypass is needed: the scoreboard keeps naming the value's pipeline
// latch until the cycle after it has been written. Registers reset to zero.
// regs_o shows the whole file, for observation only.
//
// Eight registers follow the notes; the reset value and port count are this design's own.
module w75_regfile
  import w75_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra_idx,
  output word_t    ra_data,
  input  reg_idx_t rb_idx,
  output word_t    rb_data,
  input  logic     we,
  input  reg_idx_t w_idx,
  input  word_t    w_data,
  output word_t    regs_o [NREGS]
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_idx] <= w_data;
    end
  end

  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];
  assign regs_o  = regs;

endmodule
