// w75_pkg - shared types and constants of the scoreboard-controlled w75 back end.
//
// The pipeline has a Decode/RF-read stage (D) followed by three execution stages,
// Load/Exec1 (LE), Exec2 (E2) and Store/Write-back (SW). Two paths share these stages,
// with never more than one instruction per stage: the lower path runs register-register
// operations on the INT1 ALU in LE, and the upper path runs loads, load-ops, stores and
// load-op-stores through the data-cache load port (LE), the INT2 ALU (E2) and the store
// port (SW).
//
// A register value that is produced but not yet written back sits at one of seven
// places, the scoreboard "locations": the register file itself, the INT1 output, the two
// lower-path latches BP1 and BP2 behind it, the load-port output, the INT2 output and the
// upper-path latch ST in SW. The eight registers R0-R7, the four functional units and the
// location names INT1, BP1, BP2 and LOAD follow the notes this design is built from;
// the names INT2 and ST for the upper-path places, the counter width and the
// instruction record are this design's own choices.
package w75_pkg;

  parameter int unsigned XLEN    = 32;  // data path width
  parameter int unsigned NREGS   = 8;   // R0..R7
  parameter int unsigned MUL_LAT = 3;   // multiply latency in cycles
  parameter int unsigned DIV_LAT = XLEN + 2;  // SRT divide latency in cycles
  parameter int unsigned CNT_W   = 6;   // width of a scoreboard "next cycle" counter

  typedef logic [XLEN-1:0]          word_t;
  typedef logic [$clog2(NREGS)-1:0] reg_idx_t;
  typedef logic [CNT_W-1:0]         cnt_t;

  // Value the late load-miss override substitutes for a counter ("not ready for many cycles").
  localparam cnt_t CNT_INF = '1;

  // Where the newest in-flight value of a register is (or where its producer is).
  typedef enum logic [2:0] {
    LOC_RF   = 3'd0,  // in the register file
    LOC_INT1 = 3'd1,  // INT1 ALU output, stage LE
    LOC_BP1  = 3'd2,  // lower-path latch, stage E2
    LOC_BP2  = 3'd3,  // lower-path latch, stage SW
    LOC_LOAD = 3'd4,  // data-cache load-port output, stage LE
    LOC_INT2 = 3'd5,  // INT2 ALU output, stage E2
    LOC_ST   = 3'd6   // upper-path latch, stage SW
  } loc_t;

  localparam int unsigned NLOC = 7;

  // Functional units tracked by the scoreboard, in the column order of its table.
  typedef enum logic [1:0] {
    FU_INT1  = 2'd0,
    FU_INT2  = 2'd1,
    FU_LOAD  = 2'd2,
    FU_STORE = 2'd3
  } fu_t;

  localparam int unsigned NFU = 4;

  // Execution stages behind decode.
  typedef enum logic [1:0] {
    ST_LE = 2'd0,
    ST_E2 = 2'd1,
    ST_SW = 2'd2
  } stage_t;

  localparam int unsigned NSTAGE = 3;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_MOV = 3'd5,  // result is the second operand
    ALU_MUL = 3'd6,  // multi-cycle, MUL_LAT cycles
    ALU_DIV = 3'd7   // unsigned divide, multi-cycle, DIV_LAT cycles
  } alu_op_t;

  typedef enum logic [1:0] {
    SRC_REG = 2'd0,  // second operand is register rb
    SRC_IMM = 2'd1,  // second operand is the immediate
    SRC_MEM = 2'd2   // second operand is memory at [rb]
  } src_mode_t;

  // A decoded two-operand w75 instruction: "op A B" means A = A op B, where A is register
  // ra or, with dst_mem, the memory word at [ra]; B is selected by src_mode.
  typedef struct packed {
    alu_op_t   op;
    logic      dst_mem;
    src_mode_t src_mode;
    reg_idx_t  ra;
    reg_idx_t  rb;
    word_t     imm;
  } uop_t;

  // One register column of the scoreboard.
  typedef struct packed {
    loc_t loc;
    cnt_t cnt;   // cycles until the value is ready, minus one
  } sb_reg_t;

  // One functional-unit column of the scoreboard.
  typedef struct packed {
    logic busy;
    cnt_t cnt;   // cycles until the unit is free, minus one
  } sb_fu_t;

  // ---- instruction properties ------------------------------------------------------

  // Uses the upper (memory) path.
  function automatic logic uop_upper(uop_t u);
    return u.dst_mem || (u.src_mode == SRC_MEM);
  endfunction

  // Reads the data cache in LE.
  function automatic logic uop_loads(uop_t u);
    return (u.src_mode == SRC_MEM) || (u.dst_mem && (u.op != ALU_MOV));
  endfunction

  // Writes the data cache in SW (stores and load-op-stores).
  function automatic logic uop_stores(uop_t u);
    return u.dst_mem;
  endfunction

  // Writes register ra in SW.
  function automatic logic uop_writes_reg(uop_t u);
    return !u.dst_mem;
  endfunction

  // Reads register ra: as first operand, or as the address of a memory destination.
  function automatic logic uop_reads_a(uop_t u);
    return u.dst_mem || (u.op != ALU_MOV);
  endfunction

  // Reads register rb: as second operand or as a load address.
  function automatic logic uop_reads_b(uop_t u);
    return u.src_mode != SRC_IMM;
  endfunction

  // Cycles the operation spends in its ALU.
  function automatic cnt_t op_latency(alu_op_t op);
    case (op)
      ALU_MUL: return cnt_t'(MUL_LAT);
      ALU_DIV: return cnt_t'(DIV_LAT);
      default: return cnt_t'(1);
    endcase
  endfunction

  // Next place of an in-flight value when its producer leaves its stage.
  function automatic loc_t loc_next(loc_t l);
    case (l)
      LOC_INT1: return LOC_BP1;
      LOC_BP1:  return LOC_BP2;
      LOC_LOAD: return LOC_INT2;
      LOC_INT2: return LOC_ST;
      default:  return LOC_RF;
    endcase
  endfunction

  // Stage that holds the producer of a value at a location (LOC_RF has none).
  function automatic stage_t loc_stage(loc_t l);
    case (l)
      LOC_INT1, LOC_LOAD: return ST_LE;
      LOC_BP1,  LOC_INT2: return ST_E2;
      default:            return ST_SW;
    endcase
  endfunction

endpackage
