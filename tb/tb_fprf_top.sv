// tb_fprf_top: end-to-end test of both FPRF clusters at full size.
//
// Each cluster runs its own random program (core_driver) with the default
// parameters of the design: 4-wide, 160 physical registers, 8 banks of
// 2 read / 2 write ports, read sharing and writeback filtering on, integer
// latency 1 and FP latency 2. Every committed instruction is checked against
// a sequential reference model. The test also counts, per cluster, how often
// each mechanism acted (FPRF reads, read sharing, bank-conflict stalls,
// full-queue stalls, filtered and written writebacks, write-port conflicts,
// VRF writes, bypasses, front-end captures of writebacks, misprediction
// recoveries) and counts a failure for any that never happened.
module tb_fprf_top;
  import fprf_pkg::*;

  localparam int unsigned PROG_LEN = 30000;
  localparam int unsigned MAX_CYC  = 400000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  uop_t [WIDTH-1:0]    int_uop, fp_uop;
  logic                int_ready, fp_ready, int_rv, fp_rv;
  pc_t                 int_rpc, fp_rpc;
  commit_t [WIDTH-1:0] int_commit, fp_commit;
  wb_t [NUM_FU-1:0]    int_wb, fp_wb;
  events_t             int_ev, fp_ev;

  fprf_top dut (
    .clk, .rst,
    .int_uop, .int_ready, .int_redirect_valid(int_rv), .int_redirect_pc(int_rpc),
    .int_commit, .int_wb, .int_ev,
    .fp_uop, .fp_ready, .fp_redirect_valid(fp_rv), .fp_redirect_pc(fp_rpc),
    .fp_commit, .fp_wb, .fp_ev
  );

  logic int_done, fp_done;
  int   ic, if_, icm, fc, ff, fcm;

  core_driver #(.PROG_LEN(PROG_LEN), .SEED(11)) drv_int (
    .clk, .rst, .uop(int_uop), .ready(int_ready), .redirect_valid(int_rv),
    .redirect_pc(int_rpc), .commit(int_commit), .wb(int_wb), .done(int_done),
    .checks(ic), .failures(if_), .committed(icm)
  );
  core_driver #(.PROG_LEN(PROG_LEN), .SEED(23)) drv_fp (
    .clk, .rst, .uop(fp_uop), .ready(fp_ready), .redirect_valid(fp_rv),
    .redirect_pc(fp_rpc), .commit(fp_commit), .wb(fp_wb), .done(fp_done),
    .checks(fc), .failures(ff), .committed(fcm)
  );

  localparam int NEV = 11;
  longint cnt [2][NEV];
  string  names [NEV] = '{"fprf_reads", "read_shares", "bank_stall", "iq_full_stall",
                          "wb_filtered", "wb_written", "wr_conflict", "vrf_writes",
                          "bypasses", "fe_snoops", "recovery"};

  function automatic void add(int c, events_t e);
    cnt[c][0]  += e.fprf_reads;   cnt[c][1] += e.read_shares;  cnt[c][2] += e.bank_stall;
    cnt[c][3]  += e.iq_full_stall; cnt[c][4] += e.wb_filtered; cnt[c][5] += e.wb_written;
    cnt[c][6]  += e.wr_conflict;  cnt[c][7] += e.vrf_writes;   cnt[c][8] += e.bypasses;
    cnt[c][9]  += e.fe_snoops;    cnt[c][10] += e.recovery;
  endfunction

  int cycles = 0;
  always @(posedge clk) if (!rst) begin
    cycles++;
    add(0, int_ev);
    add(1, fp_ev);
  end

  task automatic finish(int extra_fail);
    int checks, failures;
    checks   = ic + fc;
    failures = if_ + ff + extra_fail;
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < NEV; n++) begin
        checks++;
        $display("%s %-14s %0d", c == 0 ? "int" : "fp ", names[n], cnt[c][n]);
        if (cnt[c][n] == 0) begin
          failures++;
          $display("mechanism %s never happened in the %s cluster", names[n], c == 0 ? "int" : "fp");
        end
      end
    $display("cycles %0d, committed int %0d fp %0d", cycles, icm, fcm);
    for (int c = 0; c < 2; c++)
      if (cycles > 0 && cnt[c][4] + cnt[c][5] > 0)
        $display("%s: IPC %0.2f, writebacks filtered %0.1f%%", c == 0 ? "int" : "fp ",
                 real'(c == 0 ? icm : fcm) / real'(cycles),
                 100.0 * real'(cnt[c][4]) / real'(cnt[c][4] + cnt[c][5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int c = 0; c < 2; c++) for (int n = 0; n < NEV; n++) cnt[c][n] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (int_done && fp_done);
    repeat (2) @(posedge clk);
    finish(0);
  end

  // watchdog
  initial begin
    repeat (MAX_CYC) @(posedge clk);
    $display("watchdog: program did not finish");
    finish(1);
  end
endmodule
