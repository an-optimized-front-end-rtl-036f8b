// fprf_pkg: sizes, types and helper functions shared by the front-end
// physical register file (FPRF) cluster.
//
// The sizes follow the evaluated machine: 4-wide rename/issue/commit,
// 32 logical registers per register class (Alpha), 160 physical registers per
// class, a 32-entry issue queue, a 128-entry reorder buffer, 4 functional units
// per class and an FPRF of 8 banks with 2 read and 2 write ports each (the
// FPRF-8B2R2W-RS configuration, i.e. with read sharing). The data width (64,
// Alpha), the checkpoint depth and the micro-op encoding are choices of this
// design.
package fprf_pkg;

  parameter int unsigned XLEN        = 64;   // Alpha register width
  parameter int unsigned WIDTH       = 4;    // rename / issue / commit width
  parameter int unsigned NUM_LREGS   = 32;   // logical registers per class
  parameter int unsigned NUM_PREGS   = 160;  // physical registers per class
  parameter int unsigned NUM_BANKS   = 8;    // FPRF banks
  parameter int unsigned RD_PORTS    = 2;    // read ports per bank
  parameter int unsigned WR_PORTS    = 2;    // write ports per bank
  parameter int unsigned IQ_SIZE     = 32;   // issue queue (and VRF) entries
  parameter int unsigned ROB_SIZE    = 128;  // reorder buffer entries
  parameter int unsigned NUM_CKPT    = 16;   // branch stack depth (own choice)
  parameter int unsigned NUM_FU      = 4;    // functional units = writeback ports
  parameter int unsigned NUM_SRC     = 2;    // source operands per micro-op
  parameter int unsigned ROWS        = (NUM_PREGS + NUM_BANKS - 1) / NUM_BANKS;
  parameter int unsigned FL_SIZE     = 128;  // >= NUM_PREGS - NUM_LREGS, power of 2

  typedef logic [$clog2(NUM_LREGS)-1:0] lreg_t;
  typedef logic [$clog2(NUM_PREGS)-1:0] preg_t;
  typedef logic [$clog2(NUM_BANKS)-1:0] bank_t;
  typedef logic [$clog2(ROWS)-1:0]      row_t;
  typedef logic [$clog2(RD_PORTS)-1:0]  rport_t;
  typedef logic [$clog2(ROB_SIZE)-1:0]  rob_idx_t;
  typedef logic [$clog2(NUM_CKPT)-1:0]  ckpt_t;
  typedef logic [$clog2(FL_SIZE):0]     fl_ptr_t;   // with wrap bit
  typedef logic [XLEN-1:0]              word_t;
  typedef logic [31:0]                  pc_t;

  typedef preg_t [NUM_LREGS-1:0] map_t;  // one rename map

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_AND  = 3'd2,
    OP_OR   = 3'd3,
    OP_XOR  = 3'd4,
    OP_ADDI = 3'd5,   // src1 + sign-extended imm
    OP_BEQZ = 3'd6,   // branch taken when src1 == 0
    OP_BNEZ = 3'd7    // branch taken when src1 != 0
  } op_e;

  // Decoded micro-op as delivered to rename.
  typedef struct packed {
    logic              valid;
    op_e               op;
    logic [NUM_SRC-1:0] src_v;
    lreg_t [NUM_SRC-1:0] src;
    logic              dst_v;
    lreg_t             dst;
    logic [15:0]       imm;
    pc_t               pc;
    logic              pred_taken;
    pc_t               target;
  } uop_t;

  // Fields that travel with an instruction from rename to the functional unit.
  typedef struct packed {
    op_e         op;
    logic [15:0] imm;
    pc_t         pc;
    logic        pred_taken;
    pc_t         target;
    logic        dst_v;
    preg_t       dst;
    rob_idx_t    rob;
    logic        is_br;
    ckpt_t       ckpt;      // branch stack entry of a branch
  } payload_t;

  // One source operand on its way from rename to the queue.
  typedef struct packed {
    logic  used;     // instruction has this source
    preg_t tag;      // physical register
    logic  rd_fprf;  // value was computed at rename: read it from the FPRF
    logic  have;     // value already captured (FPRF read or writeback snoop)
    word_t value;
  } src_t;

  // Instruction slot in the ARB / FPRF / QUEUE pipeline registers.
  typedef struct packed {
    logic       valid;
    payload_t   pl;
    src_t [NUM_SRC-1:0] s;
  } fe_slot_t;

  // Result leaving a functional unit.
  typedef struct packed {
    logic     valid;
    logic     dst_v;
    preg_t    dst;
    word_t    value;
    rob_idx_t rob;
    logic     is_br;
    ckpt_t    ckpt;
    logic     mispredict;
    pc_t      redirect_pc;
  } result_t;

  // Writeback broadcast (results accepted this cycle).
  typedef struct packed {
    logic     valid;
    logic     dst_v;
    preg_t    dst;
    word_t    value;
    rob_idx_t rob;
  } wb_t;

  // Retired instruction.
  typedef struct packed {
    logic     valid;
    pc_t      pc;
    logic     dst_v;
    lreg_t    lreg;
    preg_t    preg;
    preg_t    old_preg;
    logic     is_br;
  } commit_t;

  // Per-cycle event counts of one cluster.
  typedef struct packed {
    logic [3:0] fprf_reads;     // operand reads granted in ARB (after sharing)
    logic [3:0] read_shares;    // operands served by a port another read opened
    logic       bank_stall;     // ARB stage held back part of a group
    logic       iq_full_stall;  // queue stage could not insert
    logic [2:0] wb_filtered;    // writebacks kept out of the FPRF
    logic [2:0] wb_written;     // writebacks written into the FPRF
    logic [2:0] wr_conflict;    // results held for lack of a bank write port
    logic [3:0] vrf_writes;     // queue entries woken with a value (VRF write)
    logic [2:0] bypasses;       // operands taken from the bypass network at issue
    logic [3:0] fe_snoops;      // operands captured from writeback in ARB/FPRF/QUEUE
    logic       recovery;       // misprediction recovery from the branch stack
  } events_t;

  function automatic bank_t bank_of(preg_t p);
    return bank_t'(32'(p) % NUM_BANKS);
  endfunction

  function automatic row_t row_of(preg_t p);
    return row_t'(32'(p) / NUM_BANKS);
  endfunction

  // Age of a reorder-buffer index relative to the head (0 = oldest).
  function automatic rob_idx_t rob_age(rob_idx_t idx, rob_idx_t head);
    return rob_idx_t'(idx - head);
  endfunction

  // True when a is younger than b.
  function automatic logic rob_younger(rob_idx_t a, rob_idx_t b, rob_idx_t head);
    return rob_age(a, head) > rob_age(b, head);
  endfunction

endpackage
