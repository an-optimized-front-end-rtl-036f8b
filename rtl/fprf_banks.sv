// fprf_banks: the banked front-end physical register file (FPRF).
//
// NUM_PREGS registers are spread over NUM_BANKS banks (register p in bank
// p % NUM_BANKS, row p / NUM_BANKS). Each bank has RD_PORTS read ports and
// WR_PORTS write ports (8 banks, 2R/2W in the evaluated configuration).
//
// Read side: the ARB stage programs every port (rd_en/rd_row, registered by
// the caller); rd_data returns the rows combinationally in the FPRF stage.
// Write side: up to NUM_FU results per cycle ask to be written (wr_req). Per
// bank the lowest-numbered requests win the WR_PORTS ports; wr_grant tells
// each requester whether its write happens at this clock edge. A refused
// writer keeps its result and asks again next cycle.
//
// Banking and port counts follow the document; how write-port conflicts are
// resolved is not described there, and the fixed priority plus retry is this
// design's own choice. Reset clears the file, so the initial architectural
// registers read as zero.
module fprf_banks
  import fprf_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst,
  input  logic  [NUM_BANKS-1:0][RD_PORTS-1:0] rd_en,
  input  row_t  [NUM_BANKS-1:0][RD_PORTS-1:0] rd_row,
  output word_t [NUM_BANKS-1:0][RD_PORTS-1:0] rd_data,
  input  logic  [NUM_FU-1:0]                 wr_req,
  input  preg_t [NUM_FU-1:0]                 wr_preg,
  input  word_t [NUM_FU-1:0]                 wr_data,
  output logic  [NUM_FU-1:0]                 wr_grant
);
  word_t mem [NUM_BANKS][ROWS];

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int p = 0; p < RD_PORTS; p++)
        rd_data[b][p] = rd_en[b][p] ? mem[b][rd_row[b][p]] : '0;
  end

  always_comb begin
    logic [NUM_BANKS-1:0][7:0] used;   // write ports taken per bank
    used = '0;
    wr_grant = '0;
    for (int k = 0; k < NUM_FU; k++)
      if (wr_req[k] && used[bank_of(wr_preg[k])] < 8'(WR_PORTS)) begin
        wr_grant[k] = 1'b1;
        used[bank_of(wr_preg[k])] = used[bank_of(wr_preg[k])] + 8'd1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < NUM_BANKS; b++)
        for (int r = 0; r < ROWS; r++) mem[b][r] <= '0;
    end else begin
      for (int k = 0; k < NUM_FU; k++)
        if (wr_grant[k]) mem[bank_of(wr_preg[k])][row_of(wr_preg[k])] <= wr_data[k];
    end
  end

endmodule
