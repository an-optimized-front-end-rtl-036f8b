// bank_arbiter: the ARB stage of the banked front-end physical register file.
//
// A rename group of up to WIDTH instructions asks for the operands that were
// already computed at rename (req). Physical register p lives in bank
// p % NUM_BANKS, row p / NUM_BANKS, and each bank has RD_PORTS read ports.
// Instructions are served oldest first (slot 0 first). An instruction is
// granted only if all its requested operands get a port; the first one that
// cannot be served, and every younger one, is refused and retries next cycle,
// so instructions leave the stage in order. With READ_SHARING set, a request
// for a register that an earlier request of the same cycle already reads takes
// no port of its own but shares that port.
//
// Outputs: grant[i] per slot (invalid slots count as granted), the per-bank
// port programme (port_en/port_row) for the FPRF read next cycle, and for every
// operand the port that delivers it (src_port). stall is set when a valid
// slot was refused (a bank conflict). n_reads/n_shares count ports opened and
// reads served by sharing.
//
// Oldest-first priority, in-order stalling, two read ports per bank and read
// sharing follow the document; bank interleaving on the low register bits is
// this design's own choice. Timing: combinational; the caller registers the
// port programme.
module bank_arbiter
  import fprf_pkg::*;
#(
  parameter bit READ_SHARING = 1'b1
) (
  input  logic [WIDTH-1:0]                    slot_valid,
  input  logic  [WIDTH-1:0][NUM_SRC-1:0]      req,
  input  preg_t [WIDTH-1:0][NUM_SRC-1:0]      req_preg,
  output logic  [WIDTH-1:0]                   grant,
  output logic                                stall,
  output logic  [NUM_BANKS-1:0][RD_PORTS-1:0] port_en,
  output row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] port_row,
  output rport_t [WIDTH-1:0][NUM_SRC-1:0]     src_port,
  output logic [3:0]                          n_reads,
  output logic [3:0]                          n_shares
);
  always_comb begin
    logic  [NUM_BANKS-1:0][RD_PORTS-1:0] en, en_t;
    row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] row, row_t_;
    rport_t [NUM_SRC-1:0] sp;
    logic blocked, ok, found;
    int unsigned reads, shares, r_t, s_t;
    bank_t b;
    row_t  r;

    en = '0; row = '0; blocked = 1'b0; reads = 0; shares = 0; b = '0; r = '0;
    found = 1'b0; sp = '0; ok = 1'b1; en_t = '0; row_t_ = '0; r_t = 0; s_t = 0;
    grant = '0; src_port = '0;
    for (int i = 0; i < WIDTH; i++) begin
      // trial allocation for instruction i on copies of the port state
      en_t = en; row_t_ = row; ok = 1'b1; r_t = reads; s_t = shares; sp = '0;
      for (int s = 0; s < NUM_SRC; s++) begin
        if (slot_valid[i] && req[i][s]) begin
          b = bank_of(req_preg[i][s]);
          r = row_of(req_preg[i][s]);
          found = 1'b0;
          if (READ_SHARING)
            for (int p = 0; p < RD_PORTS; p++)
              if (!found && en_t[b][p] && row_t_[b][p] == r) begin
                found = 1'b1; sp[s] = rport_t'(p); s_t++;
              end
          for (int p = 0; p < RD_PORTS; p++)
            if (!found && !en_t[b][p]) begin
              found = 1'b1; sp[s] = rport_t'(p);
              en_t[b][p] = 1'b1; row_t_[b][p] = r; r_t++;
            end
          if (!found) ok = 1'b0;
        end
      end
      if (!blocked && ok) begin
        grant[i] = 1'b1;
        en = en_t; row = row_t_; reads = r_t; shares = s_t;
        src_port[i] = sp;
      end else begin
        blocked = 1'b1;
      end
    end
    stall    = |(slot_valid & ~grant);
    port_en  = en;
    port_row = row;
    n_reads  = 4'(reads);
    n_shares = 4'(shares);
  end
endmodule
