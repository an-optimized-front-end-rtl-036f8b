// free_list: circular list of free physical registers.
//
// Rename takes up to WIDTH registers per cycle from the head; commit returns
// up to WIDTH released registers per cycle at the tail. The head pointer is
// saved with every branch checkpoint: on a misprediction the head is set back
// to the saved value, which returns at once every register that was allocated
// after the branch (the same recovery as the R10000-style renamer the FPRF
// cluster uses). The list itself is this design's own choice; the document
// only relies on a physical register renamer.
//
// Interface: alloc_preg[i] is the i-th register from the head, valid
// combinationally; alloc_cnt registers are removed at the clock edge.
// free_cnt counts registers available. Reset fills the list with registers
// NUM_LREGS .. NUM_PREGS-1 (registers 0 .. NUM_LREGS-1 hold the initial
// architectural state).
module free_list
  import fprf_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic [$clog2(WIDTH):0]    alloc_cnt,
  output preg_t [WIDTH-1:0]         alloc_preg,
  output fl_ptr_t                   head_ptr,
  output logic [$clog2(FL_SIZE):0]  free_cnt,
  input  logic [WIDTH-1:0]          rel_valid,
  input  preg_t [WIDTH-1:0]         rel_preg,
  input  logic                      restore,
  input  fl_ptr_t                   restore_head
);
  localparam int unsigned AW = $clog2(FL_SIZE);

  preg_t   mem [FL_SIZE];
  fl_ptr_t head, tail;

  assign head_ptr = head;
  assign free_cnt = tail - head;

  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      alloc_preg[i] = mem[AW'(head + fl_ptr_t'(i))];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < FL_SIZE; i++)
        mem[i] <= preg_t'((i + NUM_LREGS) % NUM_PREGS);
      head <= '0;
      tail <= fl_ptr_t'(NUM_PREGS - NUM_LREGS);
    end else begin
      fl_ptr_t t;
      t = tail;
      for (int i = 0; i < WIDTH; i++) begin
        if (rel_valid[i]) begin
          mem[AW'(t)] <= rel_preg[i];
          t = t + 1'b1;
        end
      end
      tail <= t;
      head <= restore ? restore_head : head + fl_ptr_t'(alloc_cnt);
    end
  end

  initial assert (FL_SIZE >= NUM_PREGS - NUM_LREGS);
  always_ff @(posedge clk)
    if (!rst && !restore) assert (fl_ptr_t'(alloc_cnt) <= free_cnt)
      else $error("free_list: allocation underflow");
endmodule
