// wb_filter: writeback filtering for the front-end physical register file.
//
// The FPRF only has to hold values that a future reader can still reach
// through a rename map: the registers of the current map and of every map
// saved in the branch stack. This block ORs the one-hot decodes of all those
// maps into a NUM_PREGS-bit "needed" mask and, for each writeback port,
// reports whether the result must be written into the FPRF (need[k]). A result
// whose register appears in no map is short-lived; its FPRF write is dropped
// while its broadcast to waiting instructions still happens elsewhere.
//
// This is the "immediate" form of the filter (mask computed in the cycle of
// the writeback), which is the form the document evaluates. With
// ENABLE = 0 every writeback is written (the unfiltered FPRF).
//
// Timing: purely combinational.
module wb_filter
  import fprf_pkg::*;
#(
  parameter bit ENABLE = 1'b1
) (
  input  map_t                    cur_map,
  input  map_t [NUM_CKPT-1:0]     ckpt_map,
  input  logic [NUM_CKPT-1:0]     ckpt_valid,
  input  logic [NUM_FU-1:0]       query_valid,
  input  preg_t [NUM_FU-1:0]      query_preg,
  output logic [NUM_FU-1:0]       need,
  output logic [NUM_PREGS-1:0]    mask
);
  always_comb begin
    mask = '0;
    for (int l = 0; l < NUM_LREGS; l++) mask[cur_map[l]] = 1'b1;
    for (int c = 0; c < NUM_CKPT; c++)
      if (ckpt_valid[c])
        for (int l = 0; l < NUM_LREGS; l++) mask[ckpt_map[c][l]] = 1'b1;
    for (int k = 0; k < NUM_FU; k++)
      need[k] = query_valid[k] && (!ENABLE || mask[query_preg[k]]);
  end
endmodule
