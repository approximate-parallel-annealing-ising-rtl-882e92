// apaim_mem: the memory block holding the coupling matrix J.
//
// N banks of N words, bank i holding row J_i,* so that one read at column
// index j (the flipped spin from the DDSS) returns J_0j ... J_(N-1)j at once,
// one value for each LAU. Writes come from the host, one word per cycle, and
// are accepted only while the instruction's write bit is set (memory write
// state). Reads happen when the instruction's read bit is set; the data are
// registered and appear the cycle after. Selecting one column per flipped-spin
// index follows the machine's description; the bank organisation and the
// one-cycle read latency are this design's choice.
module apaim_mem
  import apaim_pkg::*;
#(
  parameter int unsigned N = 64,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  instr_t        instr,
  input  logic          we,
  input  logic [AW-1:0] wr_row,
  input  logic [AW-1:0] wr_col,
  input  fp16_t         wr_data,
  input  logic [AW-1:0] rd_idx,
  output fp16_t         rdata [N]
);

  fp16_t bank [N][N];

  always_ff @(posedge clk) begin
    if (instr.write && we) bank[wr_row][wr_col] <= wr_data;
  end

  for (genvar i = 0; i < N; i++) begin : g_rd
    always_ff @(posedge clk) begin
      if (instr.read) rdata[i] <= bank[i][rd_idx];
    end
  end

endmodule
