// tb_iq_vrf: directed checks of the issue queue and its value file.
//  1. an entry inserted with both values issues the next cycle, operands from
//     the VRF;
//  2. an entry waiting on one tag issues in the cycle that tag is written
//     back, its operand taken from the bypass network;
//  3. with no unit ready, a writeback is stored into the VRF (wakeup) and the
//     entry issues later with the stored value;
//  4. a writeback in the cycle of insertion is captured;
//  5. at most one entry per ready unit issues, to the ready units only;
//  6. the queue fills to IQ_SIZE entries and a flush removes the younger ones.
module tb_iq_vrf;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  fe_slot_t [WIDTH-1:0] ins;
  logic ins_fire, flush;
  logic [$clog2(IQ_SIZE):0] free_cnt;
  wb_t [NUM_FU-1:0] wb;
  logic [NUM_FU-1:0] fu_ready, iss_valid;
  payload_t [NUM_FU-1:0] iss_pl;
  word_t [NUM_FU-1:0][NUM_SRC-1:0] iss_opnd;
  rob_idx_t flush_rob, rob_head;
  logic [3:0] n_vrf_writes;
  logic [2:0] n_bypasses;
  int checks = 0, failures = 0;

  iq_vrf dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic fe_slot_t slot(int rob, int t0, logic h0, longint v0, int t1, logic h1, longint v1);
    fe_slot_t s;
    s = '0; s.valid = 1; s.pl.rob = rob_idx_t'(rob); s.pl.dst = preg_t'(100 + rob); s.pl.dst_v = 1;
    s.s[0].used = 1; s.s[0].tag = preg_t'(t0); s.s[0].have = h0; s.s[0].value = v0;
    s.s[1].used = 1; s.s[1].tag = preg_t'(t1); s.s[1].have = h1; s.s[1].value = v1;
    return s;
  endfunction

  function automatic wb_t w(int tag, longint v);
    return '{valid: 1, dst_v: 1, dst: preg_t'(tag), value: v, rob: '0};
  endfunction

  initial begin
    ins = '0; ins_fire = 0; flush = 0; wb = '0; fu_ready = '1; flush_rob = 0; rob_head = 0;
    repeat (2) @(posedge clk); rst = 0;
    // 1 + 2: A ready, B waits on tag 50
    @(negedge clk);
    ins[0] = slot(1, 10, 1, 11, 11, 1, 22);
    ins[1] = slot(2, 50, 0, 0, 12, 1, 33);
    ins_fire = 1;
    @(negedge clk); ins = '0; ins_fire = 0; #1;
    chk(free_cnt == IQ_SIZE - 2, "two entries inserted");
    chk(iss_valid == 4'b0001 && iss_pl[0].rob == 1 && iss_opnd[0][0] == 11 && iss_opnd[0][1] == 22, "ready entry issues from VRF");
    @(negedge clk); #1;
    chk(iss_valid == 4'b0000, "waiting entry does not issue");
    wb[2] = w(50, 777); #1;
    chk(iss_valid == 4'b0001 && iss_pl[0].rob == 2 && iss_opnd[0][0] == 777 && iss_opnd[0][1] == 33 && n_bypasses == 1,
        "bypass issue in writeback cycle");
    @(negedge clk); wb = '0;
    // 3: no unit ready, wakeup writes the VRF
    ins[0] = slot(3, 60, 0, 0, 61, 0, 0); ins_fire = 1; fu_ready = '0;
    @(negedge clk); ins = '0; ins_fire = 0;
    wb[0] = w(60, 5); wb[3] = w(61, 6);
    @(negedge clk); wb = '0; #1;
    chk(iss_valid == '0, "nothing issues without a ready unit");
    chk(n_vrf_writes == 2, "two VRF writes by wakeup");
    fu_ready = 4'b0100; #1;
    chk(iss_valid == 4'b0100 && iss_opnd[2][0] == 5 && iss_opnd[2][1] == 6, "woken entry issues to the ready unit");
    @(negedge clk); fu_ready = '1;
    // 4: writeback during insertion
    ins[0] = slot(4, 70, 0, 0, 12, 1, 1); ins_fire = 1; wb[1] = w(70, 99);
    @(negedge clk); ins = '0; ins_fire = 0; wb = '0; #1;
    chk(iss_valid == 4'b0001 && iss_opnd[0][0] == 99, "writeback captured at insertion");
    // 5 + 6: fill the queue with waiting entries (rob 10..41), then make 6 ready
    @(negedge clk); fu_ready = '0;
    for (int g = 0; g < IQ_SIZE / WIDTH; g++) begin
      for (int i = 0; i < WIDTH; i++) ins[i] = slot(10 + g * WIDTH + i, 90, 0, 0, 12, 1, 0);
      ins_fire = 1;
      @(negedge clk);
    end
    ins = '0; ins_fire = 0; #1;
    chk(free_cnt == 0, "queue full");
    fu_ready = 4'b1011; wb[0] = w(90, 1); #1;
    chk(iss_valid == 4'b1011, "one entry per ready unit");
    // flush at rob 20 (head 0): entries 21..41 go, 10..20 stay
    fu_ready = '0; wb = '0; flush = 1; flush_rob = 20;
    @(negedge clk); flush = 0; #1;
    chk(free_cnt == IQ_SIZE - 11, "flush removes younger entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
