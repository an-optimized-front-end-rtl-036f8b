// rename_map: register alias table of one register class plus the
// "computed value" bit vector that decides which operands are read from the
// front-end physical register file (FPRF).
//
// How it works: the map holds, for each of the NUM_LREGS logical registers, the
// physical register of its newest definition. Next to it sits one bit per
// logical register that is set while that newest definition has been written
// back. During rename each source looks up the map; if its bit is set (or the
// value is on the writeback bus in this very cycle) the operand is marked
// rd_fprf and will be read from the FPRF two stages later; otherwise it will
// arrive through writeback into the queue's value file or the bypass network.
// Sources defined by an older instruction of the same rename group take that
// instruction's new register and are never computed. Destinations take the
// registers offered by the free list in order, clear the computed bit, and
// report the previous mapping (old_preg) so commit can free it.
//
// The map and the logical bit vector follow the document. To rebuild the bit
// vector after a misprediction this design also keeps one "written" bit per
// physical register: computed[l] = written[restored_map[l]].
//
// Timing: lookups are combinational on uop_i and the registered map; updates
// (fire, writeback, restore) happen at the clock edge. map_after[i] is the
// map including the destinations of slots 0..i, used for checkpoints.
module rename_map
  import fprf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  uop_t [WIDTH-1:0]      uop_i,
  input  logic                  fire,          // commit this group's renaming
  input  preg_t [WIDTH-1:0]     free_preg,     // from the free list, in order
  output preg_t [WIDTH-1:0][NUM_SRC-1:0] src_preg,
  output logic  [WIDTH-1:0][NUM_SRC-1:0] src_computed,
  output preg_t [WIDTH-1:0]     dst_preg,
  output preg_t [WIDTH-1:0]     old_preg,
  output logic [$clog2(WIDTH):0] dst_cnt,      // registers taken from the free list
  output map_t  [WIDTH-1:0]     map_after,
  output map_t                  cur_map,
  input  wb_t  [NUM_FU-1:0]     wb,
  input  logic                  restore,
  input  map_t                  restore_map
);
  map_t                   map_q;
  logic [NUM_LREGS-1:0]   computed_q;
  logic [NUM_PREGS-1:0]   written_q;

  assign cur_map = map_q;

  function automatic logic wb_hit(preg_t p, wb_t [NUM_FU-1:0] w);
    logic h;
    h = 1'b0;
    for (int k = 0; k < NUM_FU; k++)
      if (w[k].valid && w[k].dst_v && w[k].dst == p) h = 1'b1;
    return h;
  endfunction

  always_comb begin
    map_t m;
    logic [NUM_LREGS-1:0] fresh;   // logical regs redefined earlier in the group
    int unsigned n;
    m     = map_q;
    fresh = '0;
    n     = 0;
    for (int i = 0; i < WIDTH; i++) begin
      for (int s = 0; s < NUM_SRC; s++) begin
        src_preg[i][s]     = m[uop_i[i].src[s]];
        src_computed[i][s] = uop_i[i].valid && uop_i[i].src_v[s] &&
                             !fresh[uop_i[i].src[s]] &&
                             (computed_q[uop_i[i].src[s]] || wb_hit(m[uop_i[i].src[s]], wb));
      end
      old_preg[i] = m[uop_i[i].dst];
      dst_preg[i] = free_preg[n];
      if (uop_i[i].valid && uop_i[i].dst_v) begin
        m[uop_i[i].dst]     = free_preg[n];
        fresh[uop_i[i].dst] = 1'b1;
        n++;
      end
      map_after[i] = m;
    end
    dst_cnt = ($clog2(WIDTH)+1)'(n);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < NUM_LREGS; l++) map_q[l] <= preg_t'(l);
      computed_q <= '1;
      for (int p = 0; p < NUM_PREGS; p++) written_q[p] <= (p < NUM_LREGS);
    end else begin
      logic [NUM_PREGS-1:0] wr;
      wr = written_q;
      for (int k = 0; k < NUM_FU; k++)
        if (wb[k].valid && wb[k].dst_v) wr[wb[k].dst] = 1'b1;
      if (restore) begin
        map_q <= restore_map;
        for (int l = 0; l < NUM_LREGS; l++) computed_q[l] <= wr[restore_map[l]];
      end else begin
        logic [NUM_LREGS-1:0] c;
        for (int l = 0; l < NUM_LREGS; l++)
          c[l] = computed_q[l] | wb_hit(map_q[l], wb);
        if (fire) begin
          for (int i = 0; i < WIDTH; i++)
            if (uop_i[i].valid && uop_i[i].dst_v) begin
              c[uop_i[i].dst]  = 1'b0;
              wr[dst_preg[i]]  = 1'b0;
            end
          map_q <= map_after[WIDTH-1];
        end
        computed_q <= c;
      end
      written_q <= wr;
    end
  end
endmodule
