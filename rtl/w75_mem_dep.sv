// w75_mem_dep - memory-dependency stall for the w75 back end.
//
// A load-op-store touches the data cache twice, reading in Load/Exec1 and writing in
// Store/Write-back, so a later load can read a location before an earlier store has
// written it. Store and load addresses are not compared: an instruction in decode that
// reads memory (a load, load-op or load-op-store) is held while any store or
// load-op-store sits in LE, E2 or SW, i.e. has not yet written the cache. Stores in SW
// write at the end of the cycle, so a load released in that cycle reads the new data
// in LE. Purely combinational.
//
// The rule follows the notes; counting SW as "not yet written" is the literal reading
// kept here, although a store in SW would already be early enough.
module w75_mem_dep
  import w75_pkg::*;
(
  input  logic d_valid,
  input  logic d_loads,
  input  logic stage_valid  [NSTAGE],
  input  logic stage_stores [NSTAGE],
  output logic stall
);

  logic store_pending;

  always_comb begin
    store_pending = 1'b0;
    for (int s = 0; s < NSTAGE; s++)
      if (stage_valid[s] && stage_stores[s]) store_pending = 1'b1;
    stall = d_valid && d_loads && store_pending;
  end

endmodule
