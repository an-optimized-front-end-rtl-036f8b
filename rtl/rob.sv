// rob: reorder buffer.
//
// Rename allocates up to WIDTH entries per cycle at the tail, in program
// order; alloc_idx[i] is the entry the i-th valid slot gets (it doubles as
// the instruction's age tag). Writeback marks entries done. Up to WIDTH done
// entries leave from the head per cycle (commit, combinational outputs, head
// moves at the clock edge); a committing instruction that wrote a register
// hands the register's previous mapping (old_preg) back to the free list, and
// a committing branch releases its checkpoint. On a misprediction every entry
// after the branch is dropped (the tail moves to just after it).
//
// The document names the reorder buffer (128 entries) and relies on
// R10000-style in-order commit; the entry layout is this design's own.
module rob
  import fprf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  commit_t [WIDTH-1:0]    alloc,        // .valid marks a slot; pc/dst/preg/old_preg/is_br
  input  logic                   alloc_fire,
  output rob_idx_t [WIDTH-1:0]   alloc_idx,
  output logic [$clog2(ROB_SIZE):0] free_cnt,
  input  logic [NUM_FU-1:0]      done_valid,
  input  rob_idx_t [NUM_FU-1:0]  done_rob,
  input  logic                   flush,
  input  rob_idx_t               flush_rob,
  output rob_idx_t               head_idx,
  output commit_t [WIDTH-1:0]    commit
);
  localparam int unsigned AW = $clog2(ROB_SIZE);
  typedef logic [AW:0] ptr_t;

  commit_t           ent  [ROB_SIZE];
  logic [ROB_SIZE-1:0] done_q;
  ptr_t              head, tail;

  assign head_idx = AW'(head);
  assign free_cnt = ptr_t'(ROB_SIZE) - (tail - head);

  always_comb begin
    ptr_t t;
    t = tail;
    for (int i = 0; i < WIDTH; i++) begin
      alloc_idx[i] = AW'(t);
      if (alloc[i].valid) t = t + 1'b1;
    end
  end

  always_comb begin
    logic stop;
    stop = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      ptr_t p;
      p = head + ptr_t'(i);
      commit[i] = ent[AW'(p)];
      if (stop || p == tail || !done_q[AW'(p)]) stop = 1'b1;
      commit[i].valid = !stop;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head   <= '0;
      tail   <= '0;
      done_q <= '0;
    end else begin
      ptr_t t, h;
      logic [ROB_SIZE-1:0] d;
      h = head;
      for (int i = 0; i < WIDTH; i++) if (commit[i].valid) h = h + 1'b1;
      head <= h;
      d = done_q;
      for (int k = 0; k < NUM_FU; k++)
        if (done_valid[k]) d[done_rob[k]] = 1'b1;
      if (flush) begin
        tail <= head + ptr_t'(rob_age(flush_rob, AW'(head))) + 1'b1;
      end else if (alloc_fire) begin
        t = tail;
        for (int i = 0; i < WIDTH; i++)
          if (alloc[i].valid) begin
            ent[AW'(t)] <= alloc[i];
            d[AW'(t)]   = 1'b0;
            t = t + 1'b1;
          end
        tail <= t;
      end
      done_q <= d;
    end
  end

  always_ff @(posedge clk)
    if (!rst && alloc_fire && !flush)
      for (int i = 0; i < WIDTH; i++)
        assert (!alloc[i].valid || free_cnt > ptr_t'(i)) else $error("rob: overflow");
endmodule
