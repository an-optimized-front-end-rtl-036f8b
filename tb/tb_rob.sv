// tb_rob: checks the reorder buffer. Random allocation groups, completion in
// random order, and commit: entries must leave strictly in allocation order,
// at most four per cycle, only when done, carrying what was allocated. A
// flush at a random in-flight entry must drop exactly the younger entries.
module tb_rob;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  commit_t [WIDTH-1:0] alloc, commit;
  logic alloc_fire, flush;
  rob_idx_t [WIDTH-1:0] alloc_idx;
  logic [$clog2(ROB_SIZE):0] free_cnt;
  logic [NUM_FU-1:0] done_valid;
  rob_idx_t [NUM_FU-1:0] done_rob;
  rob_idx_t flush_rob, head_idx;
  int checks = 0, failures = 0, flushes = 0, full_seen = 0;

  rob dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: queue of in-flight entries (pc = sequence number)
  int unsigned q_pc [$];
  rob_idx_t    q_idx [$];
  bit          q_done [$];
  int unsigned seq = 0, next_commit = 0;

  initial begin
    alloc = '0; alloc_fire = 0; flush = 0; flush_rob = 0; done_valid = '0; done_rob = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int n, nflush;
      @(negedge clk);
      // completions of random in-flight entries
      done_valid = '0;
      for (int k = 0; k < NUM_FU; k++)
        if (q_pc.size() > 0 && $urandom_range(0, 1)) begin
          int j; j = $urandom_range(0, q_pc.size() - 1);
          done_valid[k] = 1; done_rob[k] = q_idx[j];
        end
      // allocation
      n = $urandom_range(0, WIDTH);
      alloc = '0;
      for (int i = 0; i < n; i++) begin
        alloc[i].valid = 1; alloc[i].pc = seq + i; alloc[i].dst_v = 1;
        alloc[i].preg = preg_t'(seq + i); alloc[i].old_preg = preg_t'(seq + i + 1);
      end
      alloc_fire = n > 0 && int'(free_cnt) >= n;
      if (int'(free_cnt) < WIDTH) full_seen++;
      // occasional flush (not together with allocation)
      flush = 0;
      if ($urandom_range(0, 60) == 0 && q_pc.size() > 2) begin
        // a mispredicted branch has not completed yet, so it cannot commit now
        nflush = $urandom_range(0, q_pc.size() - 1);
        if (!q_done[nflush]) begin
          flush = 1; flush_rob = q_idx[nflush]; alloc_fire = 0;
          for (int k = 0; k < NUM_FU; k++) if (done_rob[k] == flush_rob) done_valid[k] = 0;
        end
      end
      #1;
      // commit check against the reference
      for (int i = 0; i < WIDTH; i++) begin
        logic exp;
        exp = (i < q_pc.size());
        for (int j = 0; j <= i && j < q_pc.size(); j++) if (!q_done[j]) exp = 0;
        chk(commit[i].valid == exp, "commit valid");
        if (commit[i].valid != exp && failures < 5) $display("t=%0d i=%0d got %0d exp %0d qsize %0d done0 %0d", t, i, commit[i].valid, exp, q_pc.size(), q_pc.size() > 0 ? q_done[0] : 9);
        if (exp) chk(commit[i].pc == q_pc[i] && commit[i].old_preg == preg_t'(q_pc[i] + 1), "commit content in order");
      end
      if (alloc_fire)
        for (int i = 0; i < n; i++) chk(alloc_idx[i] == rob_idx_t'(seq + i), "allocation index");
      @(posedge clk);
      // update reference
      for (int i = 0; i < WIDTH; i++) if (commit[i].valid) begin
        void'(q_pc.pop_front()); void'(q_idx.pop_front()); void'(q_done.pop_front());
        next_commit++;
      end
      for (int k = 0; k < NUM_FU; k++) if (done_valid[k])
        foreach (q_idx[j]) if (q_idx[j] == done_rob[k]) q_done[j] = 1;
      if (flush) begin
        int keep;
        flushes++;
        keep = -1;
        foreach (q_idx[j]) if (q_idx[j] == flush_rob) keep = j;
        while (q_pc.size() > keep + 1) begin
          void'(q_pc.pop_back()); void'(q_idx.pop_back()); void'(q_done.pop_back());
        end
        seq = (q_pc.size() > 0) ? q_pc[$] + 1 : seq;
      end
      if (alloc_fire) begin
        for (int i = 0; i < n; i++) begin q_pc.push_back(seq + i); q_idx.push_back(rob_idx_t'(seq + i)); q_done.push_back(0); end
        seq += n;
      end
    end
    chk(flushes > 0 && full_seen > 0, "flush and full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
