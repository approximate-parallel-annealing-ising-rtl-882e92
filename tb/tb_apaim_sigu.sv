// tb_apaim_sigu: checks that omega0 is written, omega is zero after init,
// that on cs_update omega takes c*omega0 when rand >= p and zero when rand < p,
// that it holds otherwise, and that the dropout frequency follows p.
module tb_apaim_sigu;
  import apaim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, w0_we = 0;
  instr_t instr;
  fp16_t w0_wdata, cw, omega, omega0;
  logic [15:0] rnd, p;
  int drops = 0;

  apaim_sigu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s omega=%h", what, omega); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; cw = 16'h3A00; rnd = 0; p = 0; w0_wdata = 16'h4100;
    @(negedge clk); rst_n = 1;
    w0_we = 1; @(negedge clk); w0_we = 0;
    chk(omega0 == 16'h4100, "omega0 written");
    instr.cs_update = 1; rnd = 16'h8000; p = 16'h4000; @(negedge clk);
    chk(omega == 16'h3A00, "keep: c*omega0");
    rnd = 16'h1000; @(negedge clk);
    chk(omega == 16'h0000, "dropout");
    instr.cs_update = 0; cw = 16'h3800; rnd = 16'hFFFF; @(negedge clk);
    chk(omega == 16'h0000, "hold without cs_update");
    instr.cs_update = 1; @(negedge clk);
    chk(omega == 16'h3800, "update again");
    instr.cs_update = 0; init = 1; @(negedge clk); init = 0;
    chk(omega == 16'h0000, "init clears");
    instr.cs_update = 1; p = 16'h4CCD;                  // 0.3
    for (int t = 0; t < 4000; t++) begin
      rnd = 16'($urandom);
      @(negedge clk);
      chk(omega == ((rnd < p) ? 16'h0000 : cw), "rule");
      if (omega == 16'h0000) drops++;
    end
    chk(drops > 1050 && drops < 1350, "dropout rate near p");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
