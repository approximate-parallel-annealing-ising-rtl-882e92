// tb_apaim_mem: fills the J memory with a pattern through the write port (only
// while the write bit is set; writes without it must be ignored), then reads
// every column index and checks all N outputs one cycle after the read.
module tb_apaim_mem;
  import apaim_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  instr_t instr;
  logic we;
  logic [2:0] wr_row, wr_col, rd_idx;
  fp16_t wr_data;
  fp16_t rdata [N];

  apaim_mem #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic fp16_t pat(int i, int j);
    return 16'(i * 977 + j * 131 + 7);
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; we = 0; rd_idx = 0; wr_row = 0; wr_col = 0; wr_data = 0;
    instr.write = 1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      we = 1; wr_row = 3'(i); wr_col = 3'(j); wr_data = pat(i, j);
      @(negedge clk);
    end
    instr.write = 0;                       // not in memory write: ignored
    wr_row = 2; wr_col = 5; wr_data = 16'hDEAD; @(negedge clk);
    we = 0;
    for (int j = 0; j < N; j++) begin
      instr.read = 1; rd_idx = 3'(j);
      @(negedge clk);
      instr.read = 0;
      for (int i = 0; i < N; i++) chk(rdata[i] == pat(i, j), "column read");
      rd_idx = 3'(N - 1 - j);
      @(negedge clk);
      for (int i = 0; i < N; i++) chk(rdata[i] == pat(i, j), "held without read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
