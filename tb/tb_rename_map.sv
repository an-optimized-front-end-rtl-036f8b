// tb_rename_map: checks renaming and the computed-value bit vector.
// Covers: initial identity map with all values computed; a group with an
// intra-group dependence (the consumer must get the producer's new register
// and be marked not computed); the previous mapping reported for commit; the
// computed bit set by a writeback of the mapped register, and seen at rename
// in the same cycle as that writeback; a restore that rebuilds the map and
// the computed bits from a checkpoint.
module tb_rename_map;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  uop_t [WIDTH-1:0] uop_i;
  logic fire, restore;
  preg_t [WIDTH-1:0] free_preg, dst_preg, old_preg;
  preg_t [WIDTH-1:0][NUM_SRC-1:0] src_preg;
  logic  [WIDTH-1:0][NUM_SRC-1:0] src_computed;
  logic [$clog2(WIDTH):0] dst_cnt;
  map_t [WIDTH-1:0] map_after;
  map_t cur_map, restore_map, saved;
  wb_t [NUM_FU-1:0] wb;
  int checks = 0, failures = 0;

  rename_map dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic uop_t alu(int d, int s0, int s1);
    uop_t u;
    u = '0; u.valid = 1; u.op = OP_ADD; u.src_v = 2'b11; u.src[0] = lreg_t'(s0); u.src[1] = lreg_t'(s1);
    u.dst_v = 1; u.dst = lreg_t'(d);
    return u;
  endfunction

  initial begin
    uop_i = '0; fire = 0; restore = 0; restore_map = '0; wb = '0;
    for (int i = 0; i < WIDTH; i++) free_preg[i] = preg_t'(40 + i);
    repeat (2) @(posedge clk); rst = 0; @(negedge clk);
    // group: r1 = r2+r3 ; r4 = r1+r1 ; branch-like (no dst) reading r4 ; r2 = r5+r4
    uop_i[0] = alu(1, 2, 3);
    uop_i[1] = alu(4, 1, 1);
    uop_i[2] = alu(0, 4, 6); uop_i[2].dst_v = 0;
    uop_i[3] = alu(2, 5, 4);
    #1;
    chk(src_preg[0][0] == 2 && src_preg[0][1] == 3 && src_computed[0] == 2'b11, "slot0 reads initial map");
    chk(src_preg[1][0] == 40 && src_preg[1][1] == 40 && src_computed[1] == 2'b00, "slot1 intra-group");
    chk(src_preg[2][0] == 41 && src_computed[2][0] == 1'b0, "slot2 reads slot1's register");
    chk(dst_preg[0] == 40 && dst_preg[1] == 41 && dst_preg[3] == 42 && dst_cnt == 3, "destinations");
    chk(old_preg[0] == 1 && old_preg[1] == 4 && old_preg[3] == 2, "previous mappings");
    chk(map_after[1][4] == 41 && map_after[0][4] == 4, "map after each slot");
    fire = 1; @(negedge clk); fire = 0;
    saved = cur_map;
    chk(cur_map[1] == 40 && cur_map[4] == 41 && cur_map[2] == 42, "map updated");
    // lookup r1 with no writeback: not computed
    uop_i = '0; uop_i[0] = alu(7, 1, 4); #1;
    chk(src_computed[0] == 2'b00, "pending after rename");
    // writeback of p40 in this cycle: seen at rename already
    wb[0] = '{valid: 1, dst_v: 1, dst: 8'd40, value: 64'd5, rob: '0}; #1;
    chk(src_computed[0] == 2'b01, "same-cycle writeback visible");
    @(negedge clk); wb = '0; #1;
    chk(src_computed[0] == 2'b01, "computed bit set by writeback");
    // rename r1 again: computed bit cleared for the new definition
    for (int i = 0; i < WIDTH; i++) free_preg[i] = preg_t'(50 + i);
    uop_i = '0; uop_i[0] = alu(1, 3, 3); fire = 1; @(negedge clk); fire = 0;
    uop_i = '0; uop_i[0] = alu(7, 1, 4); #1;
    chk(src_preg[0][0] == 50 && src_computed[0] == 2'b00, "redefinition clears computed");
    // write back p41 (r4) then restore the saved map: r1 -> p40 (written), r4 -> p41 (written)
    wb[1] = '{valid: 1, dst_v: 1, dst: 8'd41, value: 64'd9, rob: '0};
    restore = 1; restore_map = saved; @(negedge clk); restore = 0; wb = '0; #1;
    chk(cur_map == saved, "map restored");
    chk(src_preg[0][0] == 40 && src_computed[0] == 2'b11, "computed rebuilt on restore");
    uop_i[0] = alu(7, 2, 3); #1;
    chk(src_preg[0][0] == 42 && src_computed[0] == 2'b10, "unwritten register stays pending");
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
