// tb_branch_stack: checks the rename-map checkpoints.
// Pushes several checkpoints (up to four in one cycle), checks the ids given,
// the valid mask exported for the writeback filter, a restore that reads back
// the right map and free-list head and drops the younger checkpoints, pops at
// commit, and the free count.
module tb_branch_stack;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [WIDTH-1:0] push_valid;
  map_t [WIDTH-1:0] push_map;
  fl_ptr_t [WIDTH-1:0] push_fl_head;
  ckpt_t [WIDTH-1:0] push_id;
  logic [$clog2(NUM_CKPT):0] free_cnt;
  logic [$clog2(WIDTH):0] pop_cnt;
  logic restore;
  ckpt_t restore_id;
  map_t restore_map;
  fl_ptr_t restore_fl_head;
  map_t [NUM_CKPT-1:0] ckpt_map;
  logic [NUM_CKPT-1:0] ckpt_valid;
  int checks = 0, failures = 0;

  branch_stack dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic map_t mk(int seed);
    map_t m;
    for (int l = 0; l < NUM_LREGS; l++) m[l] = preg_t'((seed * 7 + l * 3) % NUM_PREGS);
    return m;
  endfunction

  initial begin
    push_valid = '0; push_map = '0; push_fl_head = '0; pop_cnt = 0; restore = 0; restore_id = 0;
    repeat (2) @(posedge clk); rst = 0; @(negedge clk);
    chk(free_cnt == NUM_CKPT && ckpt_valid == '0, "empty after reset");
    // push 3 of 4 slots (slot 1 not a branch)
    push_valid = 4'b1101;
    for (int i = 0; i < WIDTH; i++) begin push_map[i] = mk(i + 1); push_fl_head[i] = fl_ptr_t'(10 + i); end
    #1 chk(push_id[0] == 0 && push_id[2] == 1 && push_id[3] == 2, "ids of first pushes");
    @(negedge clk);
    push_valid = 4'b0011;
    for (int i = 0; i < WIDTH; i++) begin push_map[i] = mk(i + 10); push_fl_head[i] = fl_ptr_t'(40 + i); end
    #1 chk(push_id[0] == 3 && push_id[1] == 4, "ids continue");
    @(negedge clk);
    push_valid = '0;
    chk(free_cnt == NUM_CKPT - 5 && ckpt_valid == 16'h001f, "five checkpoints");
    chk(ckpt_map[1] == mk(3) && ckpt_map[4] == mk(11), "stored maps");
    // restore checkpoint 1: keeps 0 and 1
    restore_id = 1; #1;
    chk(restore_map == mk(3) && restore_fl_head == 12, "restore read-back");
    restore = 1; @(negedge clk); restore = 0;
    chk(ckpt_valid == 16'h0003 && free_cnt == NUM_CKPT - 2, "younger checkpoints dropped");
    // pop the oldest
    pop_cnt = 1; @(negedge clk); pop_cnt = 0;
    chk(ckpt_valid == 16'h0002, "pop");
    // wrap around: push 16 more over several cycles until full
    for (int c = 0; c < 4; c++) begin
      push_valid = (c < 3) ? 4'b1111 : 4'b0111;
      @(negedge clk);
    end
    push_valid = '0;
    chk(free_cnt == 0 && ckpt_valid == '1, "full");
    restore_id = ckpt_t'(2 + 3); restore = 1; @(negedge clk); restore = 0;
    chk(free_cnt == NUM_CKPT - 5, "restore after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
