// tb_fprf_core: one cluster, run twice side by side on random programs:
//   - the default configuration (read sharing and writeback filtering on,
//     latency-1 units), and
//   - the configuration without read sharing or filtering (FPRF-8B2R2W),
//     with latency-2 units.
// Every commit is checked against a sequential reference (core_driver). The
// pipeline depth is checked on the first instruction: accepted by rename in
// cycle t, it passes ARB (t+1), FPRF (t+2), QUEUE (t+3), issues at t+4,
// writes back after the unit's latency and commits one cycle later, so it
// must commit at t+5+LAT. The test also checks that filtering removed FPRF
// writes only in the configuration that has it, and read sharing likewise.
module tb_fprf_core;
  import fprf_pkg::*;
  localparam int unsigned PROG_LEN = 4000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uop_t [1:0][WIDTH-1:0]    uop;
  logic [1:0]               ready, rv, done;
  pc_t  [1:0]               rpc;
  commit_t [1:0][WIDTH-1:0] commit;
  wb_t [1:0][NUM_FU-1:0]    wb;
  events_t [1:0]            ev;
  int dchecks [2], dfail [2], dcm [2];

  fprf_core dut_a (.clk, .rst, .in_uop(uop[0]), .in_ready(ready[0]), .redirect_valid(rv[0]),
    .redirect_pc(rpc[0]), .commit(commit[0]), .wb(wb[0]), .ev(ev[0]));
  fprf_core #(.FU_LAT(2), .READ_SHARING(1'b0), .WB_FILTER(1'b0)) dut_b (.clk, .rst, .in_uop(uop[1]),
    .in_ready(ready[1]), .redirect_valid(rv[1]), .redirect_pc(rpc[1]), .commit(commit[1]), .wb(wb[1]), .ev(ev[1]));

  for (genvar c = 0; c < 2; c++) begin : g_drv
    core_driver #(.PROG_LEN(PROG_LEN), .SEED(3 + c)) drv (
      .clk, .rst, .uop(uop[c]), .ready(ready[c]), .redirect_valid(rv[c]), .redirect_pc(rpc[c]),
      .commit(commit[c]), .wb(wb[c]), .done(done[c]), .checks(dchecks[c]), .failures(dfail[c]),
      .committed(dcm[c]));
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0, first_acc [2], first_com [2];
  longint filt [2], shares [2], recov [2];
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < 2; c++) begin
      if (ready[c] && first_acc[c] < 0) first_acc[c] = cyc;
      if (commit[c][0].valid && first_com[c] < 0) first_com[c] = cyc;
      filt[c]   += ev[c].wb_filtered;
      shares[c] += ev[c].read_shares;
      recov[c]  += ev[c].recovery;
    end
    cyc++;
  end

  task automatic finish(int extra);
    failures += extra + dfail[0] + dfail[1];
    checks   += dchecks[0] + dchecks[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin first_acc[c] = -1; first_com[c] = -1; filt[c] = 0; shares[c] = 0; recov[c] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&done);
    repeat (2) @(posedge clk);
    chk(first_com[0] - first_acc[0] == 6, "pipeline depth, latency-1 units");
    chk(first_com[1] - first_acc[1] == 7, "pipeline depth, latency-2 units");
    $display("first commit after %0d / %0d cycles", first_com[0] - first_acc[0], first_com[1] - first_acc[1]);
    chk(filt[0] > 0 && filt[1] == 0, "writeback filtering only where enabled");
    chk(shares[0] > 0 && shares[1] == 0, "read sharing only where enabled");
    chk(recov[0] > 0 && recov[1] > 0, "mispredictions recovered");
    finish(0);
  end
  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog");
    finish(1);
  end
endmodule
