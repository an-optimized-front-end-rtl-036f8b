// core_driver: program source, fetch model and architectural checker for one
// FPRF cluster.
//
// At time zero it generates a random straight-line program of PROG_LEN
// micro-ops (ALU operations and forward conditional branches, each branch
// with a random static prediction). Phases alternate between independent
// operations on a few registers (bank conflicts, read sharing, short-lived
// values) and long dependence chains (a full issue queue). It fetches the
// program along the predicted path, WIDTH micro-ops per group, and restarts
// at the pc the cluster gives after a misprediction.
//
// Checking: results are recorded per physical register from the writeback
// stream; every committed instruction is compared with a sequential
// reference model (pc order, destination register and value). done rises
// once the whole program has committed.
module core_driver
  import fprf_pkg::*;
#(
  parameter int unsigned PROG_LEN = 2000,
  parameter int unsigned SEED     = 1
) (
  input  logic                clk,
  input  logic                rst,
  output uop_t [WIDTH-1:0]    uop,
  input  logic                ready,
  input  logic                redirect_valid,
  input  pc_t                 redirect_pc,
  input  commit_t [WIDTH-1:0] commit,
  input  wb_t [NUM_FU-1:0]    wb,
  output logic                done,
  output int                  checks,
  output int                  failures,
  output int                  committed
);
  uop_t  prog [PROG_LEN];
  word_t gregs [NUM_LREGS];
  word_t pval [NUM_PREGS];
  pc_t   fpc, gpc, nxt_fpc;

  initial begin
    int unsigned r, chain_left, last_dst;
    void'($urandom(SEED));
    chain_left = 0; last_dst = 1;
    for (int unsigned pc = 0; pc < PROG_LEN; pc++) begin
      uop_t u;
      int unsigned nregs;
      u = '0;
      u.valid = 1'b1;
      u.pc    = pc;
      if (chain_left == 0 && $urandom_range(0, 99) < 4) chain_left = $urandom_range(20, 60);
      nregs = ($urandom_range(0, 1) == 0) ? 6 : NUM_LREGS;
      r = $urandom_range(0, 99);
      if (r < 15) begin
        u.op         = ($urandom_range(0, 1) == 0) ? OP_BEQZ : OP_BNEZ;
        u.src_v      = 2'b01;
        u.src[0]     = lreg_t'($urandom_range(0, nregs - 1));
        u.pred_taken = $urandom_range(0, 1) == 1;
        u.target     = pc + 2 + $urandom_range(0, 3);
      end else begin
        case ($urandom_range(0, 5))
          0: u.op = OP_ADD;
          1: u.op = OP_SUB;
          2: u.op = OP_AND;
          3: u.op = OP_OR;
          4: u.op = OP_XOR;
          default: u.op = OP_ADDI;
        endcase
        u.src_v  = (u.op == OP_ADDI) ? 2'b01 : 2'b11;
        u.src[0] = lreg_t'($urandom_range(0, nregs - 1));
        u.src[1] = ($urandom_range(0, 3) == 0) ? u.src[0] : lreg_t'($urandom_range(0, nregs - 1));
        u.dst_v  = 1'b1;
        u.dst    = lreg_t'($urandom_range(0, nregs - 1));
        u.imm    = 16'($urandom_range(0, 7)) - 16'd3;
        if (chain_left != 0) begin
          u.src[0] = lreg_t'(last_dst);
          chain_left--;
        end
        last_dst = u.dst;
      end
      prog[pc] = u;
    end
  end

  // fetch along the predicted path
  always_comb begin
    pc_t p;
    p = fpc;
    for (int i = 0; i < WIDTH; i++) begin
      uop[i] = '0;
      if (p < PROG_LEN) begin
        uop[i] = prog[p];
        p = (prog[p].op inside {OP_BEQZ, OP_BNEZ} && prog[p].pred_taken) ? prog[p].target : p + 1;
      end
    end
    nxt_fpc = p;
  end

  function automatic word_t ref_alu(uop_t u, word_t a, word_t b);
    case (u.op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_ADDI: return a + {{(XLEN-16){u.imm[15]}}, u.imm};
      default: return '0;
    endcase
  endfunction

  assign done = gpc >= PROG_LEN;

  always @(posedge clk) begin
    if (rst) begin
      fpc <= '0; gpc = '0; checks = 0; failures = 0; committed = 0;
      for (int l = 0; l < NUM_LREGS; l++) gregs[l] = '0;
    end else begin
      // commits first: their values were written back in an earlier cycle
      for (int i = 0; i < WIDTH; i++)
        if (commit[i].valid) begin
          uop_t u;
          u = prog[gpc < PROG_LEN ? gpc : 0];
          checks++;
          committed++;
          if (commit[i].pc != gpc || gpc >= PROG_LEN) begin
            failures++;
            $display("commit order: got pc %0d, expected %0d", commit[i].pc, gpc);
          end
          if (u.op inside {OP_BEQZ, OP_BNEZ}) begin
            logic taken;
            taken = (u.op == OP_BEQZ) ? (gregs[u.src[0]] == '0) : (gregs[u.src[0]] != '0);
            gpc = taken ? u.target : gpc + 1;
          end else begin
            word_t exp;
            exp = ref_alu(u, gregs[u.src[0]], gregs[u.src[1]]);
            checks++;
            if (!commit[i].dst_v || commit[i].lreg != u.dst || pval[commit[i].preg] != exp) begin
              failures++;
              $display("pc %0d: r%0d got %h expected %h", gpc, u.dst, pval[commit[i].preg], exp);
            end
            gregs[u.dst] = exp;
            gpc = gpc + 1;
          end
        end
      for (int k = 0; k < NUM_FU; k++)
        if (wb[k].valid && wb[k].dst_v) pval[wb[k].dst] = wb[k].value;
      if (redirect_valid) fpc <= redirect_pc;
      else if (ready)     fpc <= nxt_fpc;
    end
  end
endmodule
