// tb_w75_bypass_mux - drives distinct random words on the seven location inputs and
// checks that every select value returns the input of that location.
module tb_w75_bypass_mux;
  import w75_pkg::*;

  int checks = 0;
  int failures = 0;

  loc_t  sel;
  word_t src [NLOC];
  word_t out;

  w75_bypass_mux dut (.sel(sel), .src(src), .out(out));

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int l = 0; l < NLOC; l++) src[l] = $urandom ^ (32'(l) << 28);
      for (int l = 0; l < NLOC; l++) begin
        sel = loc_t'(l);
        #1;
        checks++;
        if (out !== src[l]) begin
          failures++; $display("ERROR sel=%s out=%h expected %h", sel.name(), out, src[l]);
        end
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
