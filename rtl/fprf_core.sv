// fprf_core: one register-class cluster of the front-end physical register
// file (FPRF) microarchitecture.
//
// Pipeline (after decode, which is outside this block):
//   RENAME  map lookup; each source is classed "computed" (its value is in the
//           FPRF) or "pending"; destinations get free registers; branches
//           save a checkpoint; the reorder buffer allocates entries.
//   ARB     bank read-port arbitration for the computed sources, oldest
//           instruction first, with read sharing. A bank conflict holds the
//           refused instruction and all younger ones (and rename) in ARB.
//   FPRF    the banked register file is read with the ports granted in ARB.
//   QUEUE   the instruction and the operand values it has are written into
//           the issue queue and its value register file (VRF); a full queue
//           stalls every front-end stage.
//   ISSUE   select up to NUM_FU ready instructions; operands come from the
//           VRF or from the bypass network.
//   EXE     FU_LAT cycles in a functional unit.
//   WB      results are broadcast to the queue (VRF wakeup) and to the
//           ARB/FPRF/QUEUE stages, whose pending operands capture them, and
//           written into the FPRF unless the writeback filter finds the
//           register in no rename map (current or checkpointed). A result
//           that finds no free bank write port waits in its unit.
//   COMMIT  in order, up to WIDTH per cycle; the previous mapping of each
//           committed destination returns to the free list.
// A mispredicted branch, detected in WB, restores the rename map, the
// computed-bit vector and the free-list head from its checkpoint in the same
// cycle, removes every younger instruction and requests a fetch redirect.
//
// Interface: in_uop is a decoded group, taken when in_ready is high (the
// whole group at once). redirect_* asks fetch to restart. commit and wb are
// exported for tracing, ev counts what the mechanisms did in each cycle.
//
// Structure, stage order and the mechanisms follow the document (Fig. 1 and
// Fig. 2, Sec. 3). Own choices: the snooping of writebacks by the front-end
// stages (needed so a value produced between rename and queue insertion is not
// lost), the write-port conflict handling, the checkpoint depth, and a
// per-register "written" bit used to rebuild the computed vector on recovery.
// The filter's full mask output is connected to filt_mask for observation in
// simulation only; the cluster itself uses just the per-writeback decision.
module fprf_core
  import fprf_pkg::*;
#(
  parameter int unsigned FU_LAT       = 1,
  parameter bit          READ_SHARING = 1'b1,
  parameter bit          WB_FILTER    = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  uop_t [WIDTH-1:0]     in_uop,
  output logic                 in_ready,
  output logic                 redirect_valid,
  output pc_t                  redirect_pc,
  output commit_t [WIDTH-1:0]  commit,
  output wb_t [NUM_FU-1:0]     wb,
  output events_t              ev
);
  // ------------------------------------------------------------ signals
  fe_slot_t [WIDTH-1:0] arb_q, arb_cur, rf_q, rf_cur, q_q, q_cur, ren_slot;
  logic  [NUM_BANKS-1:0][RD_PORTS-1:0] rf_port_en;
  row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] rf_port_row;
  rport_t [WIDTH-1:0][NUM_SRC-1:0]     rf_src_port;

  logic fe_stall, arb_adv, arb_can_take, ren_fire, recover;
  rob_idx_t rob_head, rec_rob;
  ckpt_t    rec_ckpt;
  pc_t      rec_pc;

  logic  [WIDTH-1:0] rel_valid;
  preg_t [WIDTH-1:0] rel_preg;
  logic [$clog2(WIDTH):0] bs_pop;
  result_t [NUM_FU-1:0] fu_out;
  logic    [NUM_FU-1:0] fu_ready, fu_accept, killed;

  // -------------------------------------------------- misprediction detect
  always_comb begin
    recover = 1'b0; rec_rob = '0; rec_ckpt = '0; rec_pc = '0;
    for (int k = 0; k < NUM_FU; k++)
      if (fu_out[k].valid && fu_out[k].is_br && fu_out[k].mispredict &&
          (!recover || rob_younger(rec_rob, fu_out[k].rob, rob_head))) begin
        recover  = 1'b1;
        rec_rob  = fu_out[k].rob;
        rec_ckpt = fu_out[k].ckpt;
        rec_pc   = fu_out[k].redirect_pc;
      end
    for (int k = 0; k < NUM_FU; k++)
      killed[k] = recover && rob_younger(fu_out[k].rob, rec_rob, rob_head);
  end
  assign redirect_valid = recover;
  assign redirect_pc    = rec_pc;

  // ------------------------------------------------------------- rename
  preg_t [WIDTH-1:0][NUM_SRC-1:0] src_preg;
  logic  [WIDTH-1:0][NUM_SRC-1:0] src_computed;
  preg_t [WIDTH-1:0] dst_preg, old_preg, fl_alloc;
  logic [$clog2(WIDTH):0] dst_cnt;
  map_t  [WIDTH-1:0] map_after;
  map_t  cur_map, restore_map;
  fl_ptr_t fl_head, restore_fl_head;
  logic [$clog2(FL_SIZE):0]  fl_free;
  logic [$clog2(ROB_SIZE):0] rob_free;
  logic [$clog2(NUM_CKPT):0] bs_free;
  logic [$clog2(IQ_SIZE):0]  iq_free;
  ckpt_t [WIDTH-1:0] push_id;
  logic  [WIDTH-1:0] push_valid, is_br;
  fl_ptr_t [WIDTH-1:0] push_fl_head;
  rob_idx_t [WIDTH-1:0] rob_idx;
  commit_t  [WIDTH-1:0] rob_alloc;
  map_t  [NUM_CKPT-1:0] ckpt_map;
  logic  [NUM_CKPT-1:0] ckpt_valid;
  int unsigned n_valid, n_br;

  rename_map u_map (
    .clk, .rst, .uop_i(in_uop), .fire(ren_fire), .free_preg(fl_alloc),
    .src_preg, .src_computed, .dst_preg, .old_preg, .dst_cnt, .map_after, .cur_map,
    .wb, .restore(recover), .restore_map
  );

  always_comb begin
    int unsigned nd;
    n_valid = 0; n_br = 0; nd = 0;
    for (int i = 0; i < WIDTH; i++) begin
      is_br[i] = in_uop[i].valid && (in_uop[i].op == OP_BEQZ || in_uop[i].op == OP_BNEZ);
      if (in_uop[i].valid) n_valid++;
      if (is_br[i]) n_br++;
      if (in_uop[i].valid && in_uop[i].dst_v) nd++;
      push_fl_head[i] = fl_head + fl_ptr_t'(nd);
    end
    ren_fire = (n_valid != 0) && !recover && arb_can_take &&
               int'(rob_free) >= int'(n_valid) && int'(fl_free) >= int'(dst_cnt) &&
               int'(bs_free) >= int'(n_br);
    push_valid = ren_fire ? is_br : '0;
  end
  assign in_ready = ren_fire;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      rob_alloc[i] = '{valid: in_uop[i].valid, pc: in_uop[i].pc,
                       dst_v: in_uop[i].dst_v, lreg: in_uop[i].dst,
                       preg: dst_preg[i], old_preg: old_preg[i], is_br: is_br[i]};
      ren_slot[i].valid         = in_uop[i].valid;
      ren_slot[i].pl.op         = in_uop[i].op;
      ren_slot[i].pl.imm        = in_uop[i].imm;
      ren_slot[i].pl.pc         = in_uop[i].pc;
      ren_slot[i].pl.pred_taken = in_uop[i].pred_taken;
      ren_slot[i].pl.target     = in_uop[i].target;
      ren_slot[i].pl.dst_v      = in_uop[i].dst_v;
      ren_slot[i].pl.dst        = dst_preg[i];
      ren_slot[i].pl.rob        = rob_idx[i];
      ren_slot[i].pl.is_br      = is_br[i];
      ren_slot[i].pl.ckpt       = push_id[i];
      for (int s = 0; s < NUM_SRC; s++) begin
        ren_slot[i].s[s].used    = in_uop[i].src_v[s];
        ren_slot[i].s[s].tag     = src_preg[i][s];
        ren_slot[i].s[s].rd_fprf = src_computed[i][s];
        ren_slot[i].s[s].have    = 1'b0;
        ren_slot[i].s[s].value   = '0;
      end
    end
  end

  free_list u_fl (
    .clk, .rst, .alloc_cnt(ren_fire ? dst_cnt : '0), .alloc_preg(fl_alloc),
    .head_ptr(fl_head), .free_cnt(fl_free),
    .rel_valid(rel_valid), .rel_preg(rel_preg),
    .restore(recover), .restore_head(restore_fl_head)
  );

  branch_stack u_bs (
    .clk, .rst, .push_valid, .push_map(map_after), .push_fl_head, .push_id,
    .free_cnt(bs_free), .pop_cnt(bs_pop), .restore(recover), .restore_id(rec_ckpt),
    .restore_map, .restore_fl_head, .ckpt_map, .ckpt_valid
  );

  // ---------------------------------------------- writeback snoop helper
  function automatic fe_slot_t snoop(fe_slot_t x, wb_t [NUM_FU-1:0] w, output int unsigned hits);
    hits = 0;
    for (int s = 0; s < NUM_SRC; s++)
      if (x.valid && x.s[s].used && !x.s[s].rd_fprf && !x.s[s].have)
        for (int k = 0; k < NUM_FU; k++)
          if (w[k].valid && w[k].dst_v && w[k].dst == x.s[s].tag) begin
            x.s[s].have  = 1'b1;
            x.s[s].value = w[k].value;
            hits++;
          end
    return x;
  endfunction

  // ---------------------------------------------------------------- ARB
  logic  [WIDTH-1:0] grant;
  logic  arb_stall;
  logic  [NUM_BANKS-1:0][RD_PORTS-1:0] port_en;
  row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] port_row;
  rport_t [WIDTH-1:0][NUM_SRC-1:0]     src_port;
  logic  [WIDTH-1:0] arb_valid;
  logic  [WIDTH-1:0][NUM_SRC-1:0] arb_req;
  preg_t [WIDTH-1:0][NUM_SRC-1:0] arb_preg;
  logic [3:0] n_reads, n_shares;
  int unsigned snoops;

  always_comb begin
    int unsigned h;
    snoops = 0;
    for (int i = 0; i < WIDTH; i++) begin
      arb_cur[i] = snoop(arb_q[i], wb, h); snoops += h;
      rf_cur[i]  = snoop(rf_q[i],  wb, h); snoops += h;
      q_cur[i]   = snoop(q_q[i],   wb, h); snoops += h;
      arb_valid[i] = arb_q[i].valid;
      for (int s = 0; s < NUM_SRC; s++) begin
        arb_req[i][s]  = arb_q[i].s[s].used && arb_q[i].s[s].rd_fprf;
        arb_preg[i][s] = arb_q[i].s[s].tag;
      end
    end
  end

  bank_arbiter #(.READ_SHARING(READ_SHARING)) u_arb (
    .slot_valid(arb_valid), .req(arb_req), .req_preg(arb_preg), .grant,
    .stall(arb_stall), .port_en, .port_row, .src_port, .n_reads, .n_shares
  );

  assign arb_adv      = !fe_stall;
  assign arb_can_take = arb_adv && ((arb_valid & ~grant) == '0);

  // --------------------------------------------------------------- FPRF
  word_t [NUM_BANKS-1:0][RD_PORTS-1:0] rd_data;
  logic  [NUM_FU-1:0] wr_req, wr_grant, need;
  preg_t [NUM_FU-1:0] wr_preg;
  word_t [NUM_FU-1:0] wr_data;
  logic  [NUM_FU-1:0] q_valid;
  logic  [NUM_PREGS-1:0] filt_mask;   // whole filter mask (only need[] is used)

  fprf_banks u_rf (
    .clk, .rst, .rd_en(rf_port_en), .rd_row(rf_port_row), .rd_data,
    .wr_req, .wr_preg, .wr_data, .wr_grant
  );

  fe_slot_t [WIDTH-1:0] rf_out;
  always_comb begin
    rf_out = rf_cur;
    for (int i = 0; i < WIDTH; i++)
      for (int s = 0; s < NUM_SRC; s++)
        if (rf_q[i].valid && rf_q[i].s[s].used && rf_q[i].s[s].rd_fprf && !rf_q[i].s[s].have) begin
          rf_out[i].s[s].have  = 1'b1;
          rf_out[i].s[s].value = rd_data[bank_of(rf_q[i].s[s].tag)][rf_src_port[i][s]];
        end
  end

  // -------------------------------------------------------------- QUEUE
  int unsigned q_cnt;
  logic iq_fire;
  always_comb begin
    q_cnt = 0;
    for (int i = 0; i < WIDTH; i++) if (q_q[i].valid) q_cnt++;
    fe_stall = (q_cnt != 0) && (int'(iq_free) < int'(q_cnt));
    iq_fire  = (q_cnt != 0) && !fe_stall && !recover;
  end

  // ------------------------------------------------ front-end registers
  always_ff @(posedge clk) begin
    if (rst || recover) begin
      for (int i = 0; i < WIDTH; i++) begin
        arb_q[i].valid <= 1'b0;
        rf_q[i].valid  <= 1'b0;
        q_q[i].valid   <= 1'b0;
      end
    end else begin
      if (fe_stall) begin
        arb_q <= arb_cur;
        rf_q  <= rf_out;   // keeps values read or captured while waiting
        q_q   <= q_cur;
      end else begin
        q_q <= rf_out;
        for (int i = 0; i < WIDTH; i++) begin
          rf_q[i]       <= arb_cur[i];
          rf_q[i].valid <= arb_cur[i].valid && grant[i];
        end
        rf_port_en  <= port_en;
        rf_port_row <= port_row;
        rf_src_port <= src_port;
        if (ren_fire) arb_q <= ren_slot;
        else
          for (int i = 0; i < WIDTH; i++) begin
            arb_q[i]       <= arb_cur[i];
            arb_q[i].valid <= arb_cur[i].valid && !grant[i];
          end
      end
    end
  end

  // --------------------------------------------------------- issue queue
  logic     [NUM_FU-1:0] iss_valid;
  payload_t [NUM_FU-1:0] iss_pl;
  word_t    [NUM_FU-1:0][NUM_SRC-1:0] iss_opnd;
  logic [3:0] n_vrf_writes;
  logic [2:0] n_bypasses;

  iq_vrf u_iq (
    .clk, .rst, .ins(q_cur), .ins_fire(iq_fire), .free_cnt(iq_free), .wb,
    .fu_ready, .iss_valid, .iss_pl, .iss_opnd,
    .flush(recover), .flush_rob(rec_rob), .rob_head, .n_vrf_writes, .n_bypasses
  );

  // --------------------------------------------------- functional units
  for (genvar k = 0; k < NUM_FU; k++) begin : g_fu
    fu_alu #(.LAT(FU_LAT)) u_fu (
      .clk, .rst, .in_valid(iss_valid[k]), .in_pl(iss_pl[k]),
      .in_a(iss_opnd[k][0]), .in_b(iss_opnd[k][1]), .ready(fu_ready[k]),
      .out(fu_out[k]), .out_accept(fu_accept[k]),
      .flush(recover), .flush_rob(rec_rob), .rob_head
    );
  end

  // ------------------------------------------------------------ writeback
  always_comb begin
    for (int k = 0; k < NUM_FU; k++) begin
      q_valid[k] = fu_out[k].valid && !killed[k] && fu_out[k].dst_v;
      wr_preg[k] = fu_out[k].dst;
      wr_data[k] = fu_out[k].value;
    end
  end

  wb_filter #(.ENABLE(WB_FILTER)) u_filt (
    .cur_map, .ckpt_map, .ckpt_valid, .query_valid(q_valid), .query_preg(wr_preg),
    .need, .mask(filt_mask)
  );

  assign wr_req = need;

  always_comb begin
    for (int k = 0; k < NUM_FU; k++) begin
      fu_accept[k]   = !fu_out[k].valid || killed[k] || !need[k] || wr_grant[k];
      wb[k].valid    = fu_out[k].valid && !killed[k] && fu_accept[k];
      wb[k].dst_v    = fu_out[k].dst_v;
      wb[k].dst      = fu_out[k].dst;
      wb[k].value    = fu_out[k].value;
      wb[k].rob      = fu_out[k].rob;
    end
  end

  // --------------------------------------------------------------- commit
  logic  [NUM_FU-1:0] done_valid;
  rob_idx_t [NUM_FU-1:0] done_rob;

  rob u_rob (
    .clk, .rst, .alloc(rob_alloc), .alloc_fire(ren_fire), .alloc_idx(rob_idx),
    .free_cnt(rob_free), .done_valid, .done_rob, .flush(recover), .flush_rob(rec_rob),
    .head_idx(rob_head), .commit
  );

  always_comb begin
    int unsigned np;
    np = 0;
    for (int k = 0; k < NUM_FU; k++) begin
      done_valid[k] = wb[k].valid;
      done_rob[k]   = wb[k].rob;
    end
    for (int i = 0; i < WIDTH; i++) begin
      rel_valid[i] = commit[i].valid && commit[i].dst_v;
      rel_preg[i]  = commit[i].old_preg;
      if (commit[i].valid && commit[i].is_br) np++;
    end
    bs_pop = ($clog2(WIDTH)+1)'(np);
  end

  // --------------------------------------------------------------- events
  always_comb begin
    int unsigned f, w, c;
    f = 0; w = 0; c = 0;
    for (int k = 0; k < NUM_FU; k++) begin
      if (q_valid[k] && !need[k]) f++;
      if (wr_grant[k]) w++;
      if (need[k] && !wr_grant[k]) c++;
    end
    ev.fprf_reads    = fe_stall ? 4'd0 : n_reads;
    ev.read_shares   = fe_stall ? 4'd0 : n_shares;
    ev.bank_stall    = arb_stall && !fe_stall;
    ev.iq_full_stall = fe_stall;
    ev.wb_filtered   = 3'(f);
    ev.wb_written    = 3'(w);
    ev.wr_conflict   = 3'(c);
    ev.vrf_writes    = n_vrf_writes;
    ev.bypasses      = n_bypasses;
    ev.fe_snoops     = 4'(snoops);
    ev.recovery      = recover;
  end
endmodule
