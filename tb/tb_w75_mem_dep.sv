// tb_w75_mem_dep - all 256 combinations of decode valid / memory read and the valid
// and store bits of the three later stages; the stall must be exactly "a memory
// reader in decode while some valid later stage holds a store".
module tb_w75_mem_dep;
  import w75_pkg::*;

  int checks = 0;
  int failures = 0;

  logic d_valid, d_loads, stall;
  logic stage_valid [NSTAGE];
  logic stage_stores [NSTAGE];

  w75_mem_dep dut (.d_valid(d_valid), .d_loads(d_loads), .stage_valid(stage_valid),
                   .stage_stores(stage_stores), .stall(stall));

  initial begin
    for (int v = 0; v < 256; v++) begin
      automatic logic exp_pending = 1'b0;
      d_valid = v[0];
      d_loads = v[1];
      for (int s = 0; s < NSTAGE; s++) begin
        stage_valid[s]  = v[2 + 2 * s];
        stage_stores[s] = v[3 + 2 * s];
      end
      exp_pending = (v[2] & v[3]) | (v[4] & v[5]) | (v[6] & v[7]);
      #1;
      checks++;
      if (stall !== (v[0] & v[1] & exp_pending)) begin
        failures++; $display("ERROR vector %b: stall=%0b", v[7:0], stall);
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
