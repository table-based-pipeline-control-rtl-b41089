// w75_dcache_model - behavioural model of the data cache seen by the w75 back end
// (simulation only, not synthesizable intent).
//
// WORDS 32-bit words, addressed by byte address bits [2 +: log2(WORDS)]. Lines of
// LINE_WORDS words carry a valid bit. A load to a valid line hits: ld_hit and ld_rdata
// answer combinationally in the request cycle. A load to an invalid line misses for
// MISS_LAT cycles of continuous request, then the line becomes valid and the next cycle
// hits. Stores write on the rising edge and make their line valid (no store misses).
// flush clears all valid bits (contents are kept), so tests can force misses.
module w75_dcache_model
  import w75_pkg::*;
#(
  parameter int unsigned WORDS      = 256,
  parameter int unsigned LINE_WORDS = 4,
  parameter int unsigned MISS_LAT   = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  ld_req,
  input  word_t ld_addr,
  output logic  ld_hit,
  output word_t ld_rdata,
  input  logic  st_req,
  input  word_t st_addr,
  input  word_t st_wdata
);

  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned LINES = WORDS / LINE_WORDS;
  localparam int unsigned LW    = $clog2(LINE_WORDS);

  word_t       mem   [WORDS];
  logic        valid [LINES];
  int unsigned miss_cnt;

  function automatic int unsigned widx(word_t a);
    return int'(a[2 +: AW]);
  endfunction

  assign ld_hit   = valid[widx(ld_addr) >> LW];
  assign ld_rdata = mem[widx(ld_addr)];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
      miss_cnt <= 0;
    end else begin
      if (flush) begin
        for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
        miss_cnt <= 0;
      end else if (ld_req && !ld_hit) begin
        if (miss_cnt + 1 >= MISS_LAT) begin
          valid[widx(ld_addr) >> LW] <= 1'b1;
          miss_cnt <= 0;
        end else begin
          miss_cnt <= miss_cnt + 1;
        end
      end
      if (st_req) begin
        mem[widx(st_addr)] <= st_wdata;
        if (!flush) valid[widx(st_addr) >> LW] <= 1'b1;
      end
    end
  end

endmodule
