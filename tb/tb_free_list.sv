// tb_free_list: checks the free physical register list.
// After reset the list must offer registers 32..159 in order; allocations
// advance the head, releases append at the tail, and a restore of a saved
// head pointer hands back the registers allocated after it.
module tb_free_list;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [$clog2(WIDTH):0] alloc_cnt;
  preg_t [WIDTH-1:0] alloc_preg;
  fl_ptr_t head_ptr, restore_head;
  logic [$clog2(FL_SIZE):0] free_cnt;
  logic [WIDTH-1:0] rel_valid;
  preg_t [WIDTH-1:0] rel_preg;
  logic restore;
  int checks = 0, failures = 0;

  free_list dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    fl_ptr_t saved;
    int expect_next;
    alloc_cnt = 0; rel_valid = '0; rel_preg = '0; restore = 0; restore_head = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(free_cnt == 128, "free count after reset");
    for (int i = 0; i < WIDTH; i++) chk(alloc_preg[i] == preg_t'(32 + i), "first registers");
    // take 3, then 4
    alloc_cnt = 3; @(negedge clk);
    chk(alloc_preg[0] == 35, "head after 3");
    saved = head_ptr;
    alloc_cnt = 4; @(negedge clk);
    chk(alloc_preg[0] == 39 && free_cnt == 121, "head after 7");
    // release two registers
    alloc_cnt = 0; rel_valid = 4'b0101; rel_preg = {8'd0, 8'd7, 8'd0, 8'd3}; @(negedge clk);
    rel_valid = '0;
    chk(free_cnt == 123, "count after release");
    // restore to the saved head: the 4 registers 35..38 come back
    restore = 1; restore_head = saved; @(negedge clk);
    restore = 0;
    chk(free_cnt == 127 && alloc_preg[0] == 35 && alloc_preg[3] == 38, "restore");
    // drain to the released ones: 35..159 is 125 registers, then 3, 7
    expect_next = 35;
    for (int n = 0; n < 125; n++) begin
      chk(alloc_preg[0] == preg_t'(expect_next), "sequential allocation");
      expect_next++;
      alloc_cnt = 1; @(negedge clk);
    end
    alloc_cnt = 0;
    chk(alloc_preg[0] == 3 && alloc_preg[1] == 7 && free_cnt == 2, "released registers at tail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
