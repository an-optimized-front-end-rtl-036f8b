// tb_bank_arbiter: random groups of read requests against an independent
// reference. The reference counts, per bank, the distinct rows requested
// (read sharing) and grants instructions in order while every bank stays
// within two ports. The test also checks that each granted operand points at
// an enabled port of its bank holding its row, directed cases for a same-bank
// conflict, and that read sharing lets a shared register through.
module tb_bank_arbiter;
  import fprf_pkg::*;
  logic [WIDTH-1:0] slot_valid, grant;
  logic  [WIDTH-1:0][NUM_SRC-1:0] req;
  preg_t [WIDTH-1:0][NUM_SRC-1:0] req_preg;
  logic stall;
  logic  [NUM_BANKS-1:0][RD_PORTS-1:0] port_en;
  row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] port_row;
  rport_t [WIDTH-1:0][NUM_SRC-1:0] src_port;
  logic [3:0] n_reads, n_shares;
  int checks = 0, failures = 0;

  bank_arbiter dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: expected grant vector
  function automatic logic [WIDTH-1:0] ref_grant();
    preg_t seen [$];
    logic [WIDTH-1:0] g;
    logic blocked;
    g = '0; blocked = 0;
    for (int i = 0; i < WIDTH; i++) begin
      preg_t trial [$];
      int cnt [NUM_BANKS];
      trial = seen;
      for (int s = 0; s < NUM_SRC; s++)
        if (slot_valid[i] && req[i][s]) begin
          int found;
          found = 0;
          foreach (trial[j]) if (trial[j] == req_preg[i][s]) found = 1;
          if (!found) trial.push_back(req_preg[i][s]);
        end
      foreach (cnt[b]) cnt[b] = 0;
      foreach (trial[j]) cnt[trial[j] % NUM_BANKS]++;
      begin
        logic ok;
        ok = 1;
        foreach (cnt[b]) if (cnt[b] > RD_PORTS) ok = 0;
        if (!blocked && ok) begin g[i] = 1; seen = trial; end
        else blocked = 1;
      end
    end
    return g;
  endfunction

  initial begin
    // directed: three different registers of bank 0 in one instruction pair
    slot_valid = 4'b0011; req = '0;
    req[0] = 2'b11; req_preg[0][0] = 8; req_preg[0][1] = 16;
    req[1] = 2'b01; req_preg[1][0] = 24;
    #1 chk(grant[0] && !grant[1] && stall, "third read of bank 0 refused");
    // read sharing: the same register again takes no port
    req_preg[1][0] = 16;
    #1 chk(grant == 4'b1111 && !stall && n_shares == 1 && n_reads == 2, "shared read granted");
    // random
    for (int t = 0; t < 3000; t++) begin
      logic [WIDTH-1:0] eg;
      slot_valid = 4'($urandom);
      for (int i = 0; i < WIDTH; i++)
        for (int s = 0; s < NUM_SRC; s++) begin
          req[i][s] = $urandom_range(0, 2) != 0;
          req_preg[i][s] = preg_t'($urandom_range(0, 3) == 0 ? $urandom_range(0, 15) : $urandom_range(0, NUM_PREGS - 1));
        end
      #1;
      eg = ref_grant();
      chk((grant & slot_valid) == (eg & slot_valid), "grant vector");
      chk(stall == |(slot_valid & ~eg), "stall");
      for (int i = 0; i < WIDTH; i++)
        if (slot_valid[i] && grant[i])
          for (int s = 0; s < NUM_SRC; s++)
            if (req[i][s]) begin
              bank_t b; b = bank_t'(req_preg[i][s] % NUM_BANKS);
              chk(port_en[b][src_port[i][s]] && port_row[b][src_port[i][s]] == row_t'(req_preg[i][s] / NUM_BANKS),
                  "operand routed to its port");
            end
    end
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
