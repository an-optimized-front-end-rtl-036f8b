// fu_alu: one pipelined functional unit.
//
// The unit computes its result when an instruction issues and carries it
// through LAT pipeline stages; the last stage is the result register that
// drives writeback. If writeback cannot take the result (out_accept low, for
// lack of an FPRF write port) the whole unit holds and ready drops, so the
// select logic gives it no new work. Instructions younger than a mispredicted
// branch are removed from every stage (flush).
//
// Operations: add, subtract, and, or, xor, add-immediate, and the conditional
// branches BEQZ/BNEZ. A branch resolves here: it compares the outcome with the
// prediction it carries and, when they differ, reports a misprediction with
// the correct next pc (target if taken, pc+1 otherwise).
//
// The document only names the functional units and gives their latencies
// (1 cycle integer, 2 cycles FP); the operation set is this design's own
// small stand-in, since the FP arithmetic is not described.
module fu_alu
  import fprf_pkg::*;
#(
  parameter int unsigned LAT = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  payload_t    in_pl,
  input  word_t       in_a,
  input  word_t       in_b,
  output logic        ready,
  output result_t     out,
  input  logic        out_accept,
  input  logic        flush,
  input  rob_idx_t    flush_rob,
  input  rob_idx_t    rob_head
);
  result_t stg [LAT];
  logic    stall;

  function automatic result_t execute(payload_t p, word_t a, word_t b);
    result_t r;
    logic taken;
    r = '0;
    r.valid = 1'b1;
    r.dst_v = p.dst_v;
    r.dst   = p.dst;
    r.rob   = p.rob;
    r.is_br = p.is_br;
    r.ckpt  = p.ckpt;
    taken   = 1'b0;
    unique case (p.op)
      OP_ADD:  r.value = a + b;
      OP_SUB:  r.value = a - b;
      OP_AND:  r.value = a & b;
      OP_OR:   r.value = a | b;
      OP_XOR:  r.value = a ^ b;
      OP_ADDI: r.value = a + word_t'({{(XLEN-16){p.imm[15]}}, p.imm});
      OP_BEQZ: taken = (a == '0);
      OP_BNEZ: taken = (a != '0);
      default: r.value = '0;
    endcase
    if (p.is_br) begin
      r.mispredict  = taken != p.pred_taken;
      r.redirect_pc = taken ? p.target : p.pc + 32'd1;
    end
    return r;
  endfunction

  assign stall = stg[LAT-1].valid && !out_accept;
  assign ready = !stall;
  assign out   = stg[LAT-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) stg[i] <= '0;
    end else begin
      result_t nxt [LAT];
      for (int i = 0; i < LAT; i++) nxt[i] = stg[i];
      if (!stall) begin
        nxt[0] = in_valid ? execute(in_pl, in_a, in_b) : '0;
        for (int i = 1; i < LAT; i++) nxt[i] = stg[i-1];
      end
      for (int i = 0; i < LAT; i++) begin
        if (flush && rob_younger(nxt[i].rob, flush_rob, rob_head)) nxt[i].valid = 1'b0;
        stg[i] <= nxt[i];
      end
    end
  end
endmodule
