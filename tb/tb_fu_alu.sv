// tb_fu_alu: checks the functional unit at latency 1 (integer) and 2 (FP).
// Random operations are issued every cycle and each result must appear
// exactly LAT cycles later with the right value; branches must report
// mispredictions and redirect pcs; a refused result must hold the unit (ready
// low, result unchanged); a flush must remove younger results only.
module tb_fu_alu;
  import fprf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [1:0] in_valid, ready, out_accept;
  payload_t [1:0] in_pl;
  word_t [1:0] in_a, in_b;
  result_t [1:0] out;
  logic flush; rob_idx_t flush_rob, rob_head;

  fu_alu #(.LAT(1)) u1 (.clk, .rst, .in_valid(in_valid[0]), .in_pl(in_pl[0]), .in_a(in_a[0]), .in_b(in_b[0]),
    .ready(ready[0]), .out(out[0]), .out_accept(out_accept[0]), .flush, .flush_rob, .rob_head);
  fu_alu #(.LAT(2)) u2 (.clk, .rst, .in_valid(in_valid[1]), .in_pl(in_pl[1]), .in_a(in_a[1]), .in_b(in_b[1]),
    .ready(ready[1]), .out(out[1]), .out_accept(out_accept[1]), .flush, .flush_rob, .rob_head);

  function automatic result_t model(payload_t p, word_t a, word_t b);
    result_t r;
    logic t;
    r = '0; r.valid = 1; r.dst_v = p.dst_v; r.dst = p.dst; r.rob = p.rob; r.is_br = p.is_br; r.ckpt = p.ckpt;
    t = 0;
    case (p.op)
      OP_ADD: r.value = a + b;   OP_SUB: r.value = a - b;
      OP_AND: r.value = a & b;   OP_OR:  r.value = a | b;
      OP_XOR: r.value = a ^ b;   OP_ADDI: r.value = a + {{48{p.imm[15]}}, p.imm};
      OP_BEQZ: t = a == 0;       OP_BNEZ: t = a != 0;
      default: ;
    endcase
    if (p.is_br) begin r.mispredict = t != p.pred_taken; r.redirect_pc = t ? p.target : p.pc + 1; end
    return r;
  endfunction

  result_t expq [2][$];

  initial begin
    in_valid = 0; in_pl = '0; in_a = '0; in_b = '0; out_accept = 2'b11; flush = 0; flush_rob = 0; rob_head = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        payload_t p;
        p = '0;
        p.op = op_e'($urandom_range(0, 7));
        p.is_br = p.op inside {OP_BEQZ, OP_BNEZ};
        p.dst_v = !p.is_br; p.dst = preg_t'($urandom_range(0, 159));
        p.imm = 16'($urandom); p.pc = $urandom; p.target = $urandom; p.pred_taken = $urandom_range(0, 1);
        p.rob = rob_idx_t'(t);
        in_pl[u] = p;
        in_a[u] = ($urandom_range(0, 3) == 0) ? '0 : {$urandom, $urandom};
        in_b[u] = {$urandom, $urandom};
        in_valid[u] = 1;
      end
      @(posedge clk);
      for (int u = 0; u < 2; u++) expq[u].push_back(model(in_pl[u], in_a[u], in_b[u]));
      #1;
      // after the edge: unit 0 (LAT 1) shows the op issued now, unit 1 (LAT 2) the previous one
      chk(out[0] == expq[0][$], "latency-1 result");
      if (expq[1].size() >= 2) chk(out[1] == expq[1][$-1], "latency-2 result");
    end
    // hold: refuse the result for three cycles
    @(negedge clk); in_valid = 0; out_accept = 2'b00;
    @(posedge clk); #1;
    begin
      result_t h0, h1;
      h0 = out[0]; h1 = out[1];
      repeat (3) begin
        @(posedge clk); #1;
        chk(out[0] == h0 && out[1] == h1 && !ready[0] && !ready[1], "held while refused");
      end
    end
    // flush: rob head 0, flush at rob 5; unit 1 holds younger (rob 9) in its last stage
    @(negedge clk); out_accept = 2'b11;
    in_valid = 2'b11; in_pl[0].rob = 9; in_pl[1].rob = 3;
    @(posedge clk); #1;
    @(negedge clk); in_valid = 0; flush = 1; flush_rob = 5; rob_head = 0;
    chk(out[0].valid && out[0].rob == 9, "younger result present before flush");
    @(posedge clk); #1; flush = 0;
    chk(!out[0].valid, "younger result removed");
    chk(out[1].valid && out[1].rob == 3, "older result survives flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
