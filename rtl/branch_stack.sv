// branch_stack: rename-map checkpoints ("branch stack").
//
// Every conditional branch saves the rename map as it stands after the branch
// was renamed, together with the free-list head pointer. When a branch turns
// out mispredicted its checkpoint is read back (restore_map/restore_fl_head,
// combinational on restore_id) and every younger checkpoint is discarded.
// Checkpoints are released in order when their branch commits. All valid
// checkpoints are also exported (ckpt_map/ckpt_valid) because the writeback
// filter must OR them with the current map.
//
// The document gives the function (map recovery from a branch stack, as in
// the R10000); the circular organisation, the depth NUM_CKPT and the up-to-
// WIDTH pushes and pops per cycle are this design's own choices.
//
// Timing: pushes, pops and the restore take effect at the clock edge;
// push_id[i] names the slot the i-th push of this cycle will use.
module branch_stack
  import fprf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  // checkpoint creation (rename), in program order
  input  logic [WIDTH-1:0]        push_valid,
  input  map_t [WIDTH-1:0]        push_map,
  input  fl_ptr_t [WIDTH-1:0]     push_fl_head,
  output ckpt_t [WIDTH-1:0]       push_id,
  output logic [$clog2(NUM_CKPT):0] free_cnt,
  // release of the oldest checkpoints (commit)
  input  logic [$clog2(WIDTH):0]  pop_cnt,
  // misprediction recovery
  input  logic                    restore,
  input  ckpt_t                   restore_id,
  output map_t                    restore_map,
  output fl_ptr_t                 restore_fl_head,
  // all checkpoints, for writeback filtering
  output map_t [NUM_CKPT-1:0]     ckpt_map,
  output logic [NUM_CKPT-1:0]     ckpt_valid
);
  localparam int unsigned CW = $clog2(NUM_CKPT);
  typedef logic [CW:0] ptr_t;

  map_t    maps  [NUM_CKPT];
  fl_ptr_t flh   [NUM_CKPT];
  ptr_t    head, tail;

  assign free_cnt        = ptr_t'(NUM_CKPT) - (tail - head);
  assign restore_map     = maps[restore_id];
  assign restore_fl_head = flh[restore_id];

  always_comb begin
    ptr_t t;
    t = tail;
    for (int i = 0; i < WIDTH; i++) begin
      push_id[i] = ckpt_t'(t);
      if (push_valid[i]) t = t + 1'b1;
    end
  end

  always_comb begin
    for (int e = 0; e < NUM_CKPT; e++) begin
      ptr_t age;
      age           = ptr_t'(ptr_t'(e) - head) & ptr_t'(NUM_CKPT - 1);
      ckpt_valid[e] = age < (tail - head);
      ckpt_map[e]   = maps[e];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0;
      tail <= '0;
    end else begin
      for (int i = 0; i < WIDTH; i++)
        if (push_valid[i]) begin
          maps[push_id[i]] <= push_map[i];
          flh[push_id[i]]  <= push_fl_head[i];
        end
      head <= head + ptr_t'(pop_cnt);
      if (restore) begin
        // keep the mispredicted branch's own checkpoint; drop the younger ones
        tail <= {(restore_id < ckpt_t'(head)) ^ head[CW], restore_id} + 1'b1;
      end else begin
        ptr_t t;
        t = tail;
        for (int i = 0; i < WIDTH; i++) if (push_valid[i]) t = t + 1'b1;
        tail <= t;
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && !restore) assert (ptr_t'($countones(push_valid)) <= free_cnt)
      else $error("branch_stack: overflow");
endmodule
