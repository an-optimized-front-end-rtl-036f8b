// fprf_top: the two register-class clusters of the front-end physical
// register file (FPRF) processor, side by side.
//
// Alpha keeps integer and floating-point registers apart, and so does the
// FPRF design: each class has its own rename map and computed-bit vector
// (32 bits each), its own banked FPRF of 160 registers, its own 32-entry
// issue queue with value register file, and four functional units (latency 1
// for integer, 2 for FP). This top instantiates one fprf_core per class.
//
// Interface: each cluster takes a decoded 4-wide group (int_uop / fp_uop,
// accepted when *_ready is high), reports fetch redirects after a
// misprediction, and exports its commit and writeback streams and per-cycle
// event counts. Fetch, decode and the split of one instruction stream into
// the two classes, the load/store queue and the memory system are outside this
// design; the clusters therefore run independent instruction streams, and the
// FP cluster's units execute the same small operation set as the integer one
// (the FP arithmetic itself is not part of this design).
module fprf_top
  import fprf_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // integer cluster
  input  uop_t [WIDTH-1:0]    int_uop,
  output logic                int_ready,
  output logic                int_redirect_valid,
  output pc_t                 int_redirect_pc,
  output commit_t [WIDTH-1:0] int_commit,
  output wb_t [NUM_FU-1:0]    int_wb,
  output events_t             int_ev,
  // floating-point cluster
  input  uop_t [WIDTH-1:0]    fp_uop,
  output logic                fp_ready,
  output logic                fp_redirect_valid,
  output pc_t                 fp_redirect_pc,
  output commit_t [WIDTH-1:0] fp_commit,
  output wb_t [NUM_FU-1:0]    fp_wb,
  output events_t             fp_ev
);
  fprf_core #(.FU_LAT(1)) u_int (
    .clk, .rst, .in_uop(int_uop), .in_ready(int_ready),
    .redirect_valid(int_redirect_valid), .redirect_pc(int_redirect_pc),
    .commit(int_commit), .wb(int_wb), .ev(int_ev)
  );

  fprf_core #(.FU_LAT(2)) u_fp (
    .clk, .rst, .in_uop(fp_uop), .in_ready(fp_ready),
    .redirect_valid(fp_redirect_valid), .redirect_pc(fp_redirect_pc),
    .commit(fp_commit), .wb(fp_wb), .ev(fp_ev)
  );
endmodule
