// tb_wb_filter: random current maps and checkpoints against a reference that
// searches every map for the register. A register found in the current map or
// in a valid checkpoint must be written; one found nowhere (or only in an
// invalid checkpoint) must be filtered.
module tb_wb_filter;
  import fprf_pkg::*;
  map_t cur_map;
  map_t [NUM_CKPT-1:0] ckpt_map;
  logic [NUM_CKPT-1:0] ckpt_valid;
  logic [NUM_FU-1:0] query_valid, need;
  preg_t [NUM_FU-1:0] query_preg;
  logic [NUM_PREGS-1:0] mask;
  int checks = 0, failures = 0, filtered = 0;

  wb_filter dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int l = 0; l < NUM_LREGS; l++) cur_map[l] = preg_t'($urandom_range(0, NUM_PREGS - 1));
      for (int c = 0; c < NUM_CKPT; c++)
        for (int l = 0; l < NUM_LREGS; l++) ckpt_map[c][l] = preg_t'($urandom_range(0, NUM_PREGS - 1));
      ckpt_valid = NUM_CKPT'($urandom) & NUM_CKPT'($urandom);
      query_valid = 4'($urandom);
      for (int k = 0; k < NUM_FU; k++) query_preg[k] = preg_t'($urandom_range(0, NUM_PREGS - 1));
      #1;
      for (int k = 0; k < NUM_FU; k++) begin
        logic found;
        found = 0;
        for (int l = 0; l < NUM_LREGS; l++) if (cur_map[l] == query_preg[k]) found = 1;
        for (int c = 0; c < NUM_CKPT; c++)
          if (ckpt_valid[c])
            for (int l = 0; l < NUM_LREGS; l++) if (ckpt_map[c][l] == query_preg[k]) found = 1;
        chk(need[k] == (query_valid[k] && found), "need");
        if (query_valid[k] && !found) filtered++;
      end
    end
    chk(filtered > 0, "some writebacks filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
