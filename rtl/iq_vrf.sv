// iq_vrf: instruction queue with its value register file (VRF).
//
// Each of the IQ_SIZE entries holds an instruction together with its operand
// values: the left operand column is the LVRF, the right one the RVRF. An
// operand arrives in one of three ways:
//   - read from the FPRF in the front end (it comes with the inserted entry),
//   - written into the VRF by the writeback that produces it: every writeback
//     broadcasts its physical register tag, and each waiting operand with that
//     tag is written with the value and marked ready (wakeup), or
//   - taken straight from the bypass network: an entry whose last missing
//     operand is being written back in this cycle may issue in the same cycle
//     and takes the value from the writeback bus.
// Select logic issues up to NUM_FU ready entries per cycle, lowest entry
// index first, the n-th selected entry to the n-th functional unit that can
// accept work (fu_ready). Entries are inserted into the lowest free indices.
// On a misprediction every entry younger than the branch is removed.
//
// The VRF in the queue payload, writeback into it and bypassing follow the
// document; the select policy (by position) and the insertion policy are this
// design's own choices. Timing: insertion, wakeup and removal take effect at
// the clock edge; issue is combinational from the registered state and the
// current writeback bus.
module iq_vrf
  import fprf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  fe_slot_t [WIDTH-1:0]    ins,
  input  logic                    ins_fire,
  output logic [$clog2(IQ_SIZE):0] free_cnt,
  input  wb_t [NUM_FU-1:0]        wb,
  input  logic [NUM_FU-1:0]       fu_ready,
  output logic [NUM_FU-1:0]       iss_valid,
  output payload_t [NUM_FU-1:0]   iss_pl,
  output word_t [NUM_FU-1:0][NUM_SRC-1:0] iss_opnd,
  input  logic                    flush,
  input  rob_idx_t                flush_rob,
  input  rob_idx_t                rob_head,
  output logic [3:0]              n_vrf_writes,
  output logic [2:0]              n_bypasses
);
  typedef struct packed {
    logic  used;
    preg_t tag;
    logic  ready;
  } opnd_t;

  logic     [IQ_SIZE-1:0]              valid_q;
  payload_t [IQ_SIZE-1:0]              pl_q;
  opnd_t    [IQ_SIZE-1:0][NUM_SRC-1:0] op_q;
  word_t    vrf [NUM_SRC][IQ_SIZE];      // [0] = LVRF, [1] = RVRF

  function automatic logic wb_match(preg_t t, wb_t [NUM_FU-1:0] w, output word_t v);
    logic h;
    h = 1'b0; v = '0;
    for (int k = 0; k < NUM_FU; k++)
      if (w[k].valid && w[k].dst_v && w[k].dst == t) begin h = 1'b1; v = w[k].value; end
    return h;
  endfunction

  function automatic int n_ins_valid();
    int c;
    c = 0;
    for (int j = 0; j < WIDTH; j++) if (ins[j].valid) c++;
    return c;
  endfunction

  assign free_cnt = ($clog2(IQ_SIZE)+1)'(IQ_SIZE - $countones(valid_q));

  // ---------------------------------------------------------------- select
  logic [IQ_SIZE-1:0] sel;           // entries issued this cycle
  always_comb begin
    int unsigned k, n, nrdy, byp;
    int unsigned fu_of [NUM_FU];     // n-th functional unit that can accept work
    logic cand;
    word_t v;
    sel = '0; iss_valid = '0; iss_pl = '0; iss_opnd = '0; n = 0; nrdy = 0; byp = 0; k = 0;
    for (int f = 0; f < NUM_FU; f++) fu_of[f] = 0;
    for (int f = 0; f < NUM_FU; f++)
      if (fu_ready[f]) begin fu_of[nrdy] = f; nrdy++; end
    for (int e = 0; e < IQ_SIZE; e++) begin
      cand = valid_q[e] && !(flush && rob_younger(pl_q[e].rob, flush_rob, rob_head));
      for (int s = 0; s < NUM_SRC; s++)
        if (op_q[e][s].used && !op_q[e][s].ready && !wb_match(op_q[e][s].tag, wb, v))
          cand = 1'b0;
      if (cand && n < nrdy) begin
        k = fu_of[n];
        sel[e] = 1'b1;
        iss_valid[k] = 1'b1;
        iss_pl[k] = pl_q[e];
        for (int s = 0; s < NUM_SRC; s++) begin
          void'(wb_match(op_q[e][s].tag, wb, v));
          if (op_q[e][s].used && !op_q[e][s].ready) begin
            iss_opnd[k][s] = v;
            byp++;
          end else begin
            iss_opnd[k][s] = vrf[s][e];
          end
        end
        n++;
      end
    end
    n_bypasses = 3'(byp);
  end

  // -------------------------------------------- insertion, wakeup, removal
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      op_q    <= '0;
      pl_q    <= '0;
      n_vrf_writes <= '0;
    end else begin
      logic [IQ_SIZE-1:0] v_n;
      int unsigned nw, i, nins;
      int unsigned ins_of [WIDTH];     // n-th valid slot of the inserted group
      word_t v;
      v_n = valid_q & ~sel;
      nw  = 0;
      // wakeup: writeback into the VRF
      for (int e = 0; e < IQ_SIZE; e++)
        if (v_n[e])
          for (int s = 0; s < NUM_SRC; s++)
            if (op_q[e][s].used && !op_q[e][s].ready && wb_match(op_q[e][s].tag, wb, v)) begin
              op_q[e][s].ready <= 1'b1;
              vrf[s][e] <= v;
              nw++;
            end
      // insertion of the queue-stage group into free entries
      nins = 0;
      for (int j = 0; j < WIDTH; j++) ins_of[j] = 0;
      for (int j = 0; j < WIDTH; j++)
        if (ins[j].valid) begin ins_of[nins] = j; nins++; end
      i = 0;
      if (ins_fire && !flush)
        for (int e = 0; e < IQ_SIZE; e++) begin
          if (!valid_q[e] && i < nins) begin
            v_n[e]  = 1'b1;
            pl_q[e] <= ins[ins_of[i]].pl;
            for (int s = 0; s < NUM_SRC; s++) begin
              op_q[e][s].used <= ins[ins_of[i]].s[s].used;
              op_q[e][s].tag  <= ins[ins_of[i]].s[s].tag;
              if (!ins[ins_of[i]].s[s].used || ins[ins_of[i]].s[s].have) begin
                op_q[e][s].ready <= 1'b1;
                vrf[s][e] <= ins[ins_of[i]].s[s].value;
              end else if (wb_match(ins[ins_of[i]].s[s].tag, wb, v)) begin
                op_q[e][s].ready <= 1'b1;
                vrf[s][e] <= v;
                nw++;
              end else begin
                op_q[e][s].ready <= 1'b0;
              end
            end
            i++;
          end
        end
      // misprediction: drop younger entries
      if (flush)
        for (int e = 0; e < IQ_SIZE; e++)
          if (rob_younger(pl_q[e].rob, flush_rob, rob_head)) v_n[e] = 1'b0;
      valid_q <= v_n;
      n_vrf_writes <= 4'(nw);
    end
  end

  always_ff @(posedge clk)
    if (!rst && ins_fire && !flush)
      assert (int'(free_cnt) >= n_ins_valid()) else $error("iq_vrf: overflow");
endmodule
