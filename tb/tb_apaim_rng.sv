// tb_apaim_rng: compares the generator with a reference xorshift32 model for
// 5000 cycles, checks the two output halves and a rough uniformity of the low
// half (mean of rnd0 near 32768, both halves differing).
module tb_apaim_rng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] rnd0, rnd1;
  logic [31:0] m;
  real mean = 0.0;
  int  same = 0;

  apaim_rng #(.SEED(32'h1234_5678)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s %h %h %h", what, rnd0, rnd1, m); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 32'h1234_5678;
    @(negedge clk); rst_n = 1;
    chk({rnd1, rnd0} == m, "seed");
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      m = m ^ (m << 13); m = m ^ (m >> 17); m = m ^ (m << 5);
      chk({rnd1, rnd0} == m, "sequence");
      mean += real'(rnd0) / 5000.0;
      if (rnd0 == rnd1) same++;
    end
    chk(mean > 31000.0 && mean < 34500.0, "mean");
    chk(same < 10, "halves differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
