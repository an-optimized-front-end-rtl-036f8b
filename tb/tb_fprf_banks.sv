// tb_fprf_banks: checks the banked register file against a flat reference
// array. Random writes from four writeback ports: per bank at most two are
// granted, lowest port first, and only granted writes change the file. Random
// port programmes are then read back and compared.
module tb_fprf_banks;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic  [NUM_BANKS-1:0][RD_PORTS-1:0] rd_en;
  row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] rd_row;
  word_t [NUM_BANKS-1:0][RD_PORTS-1:0] rd_data;
  logic  [NUM_FU-1:0] wr_req, wr_grant;
  preg_t [NUM_FU-1:0] wr_preg;
  word_t [NUM_FU-1:0] wr_data;
  word_t ref_mem [NUM_PREGS];
  int checks = 0, failures = 0, conflicts = 0;

  fprf_banks dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (ref_mem[p]) ref_mem[p] = '0;
    rd_en = '0; rd_row = '0; wr_req = '0; wr_preg = '0; wr_data = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_FU; k++) begin
        wr_req[k]  = $urandom_range(0, 3) != 0;
        // favour a few banks so conflicts happen
        wr_preg[k] = preg_t'($urandom_range(0, 1) ? $urandom_range(0, 19) * 8 + 3 : $urandom_range(0, NUM_PREGS - 1));
        wr_data[k] = {$urandom, $urandom};
      end
      // random read programme
      for (int b = 0; b < NUM_BANKS; b++)
        for (int p = 0; p < RD_PORTS; p++) begin
          rd_en[b][p]  = $urandom_range(0, 1);
          rd_row[b][p] = row_t'($urandom_range(0, ROWS - 1));
        end
      #1;
      begin
        int used [NUM_BANKS];
        foreach (used[b]) used[b] = 0;
        for (int k = 0; k < NUM_FU; k++) begin
          logic exp;
          exp = wr_req[k] && used[wr_preg[k] % NUM_BANKS] < WR_PORTS;
          if (exp) used[wr_preg[k] % NUM_BANKS]++;
          if (wr_req[k] && !exp) conflicts++;
          chk(wr_grant[k] == exp, "write grant");
        end
      end
      for (int b = 0; b < NUM_BANKS; b++)
        for (int p = 0; p < RD_PORTS; p++)
          if (rd_en[b][p]) chk(rd_data[b][p] == ref_mem[rd_row[b][p] * NUM_BANKS + b], "read data");
      @(posedge clk);
      for (int k = 0; k < NUM_FU; k++) if (wr_grant[k]) ref_mem[wr_preg[k]] = wr_data[k];
    end
    chk(conflicts > 0, "write conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
