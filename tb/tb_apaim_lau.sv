// tb_apaim_lau: loads an initial local field, then applies 400 random flipped
// spins (J, old state) in both layer settings. After each lau_en the updated
// field must equal old field - 2*sigma_old*J within the LOTA-5&3 error bound,
// the other layer's field must be unchanged, and without lau_en nothing moves.
// Also checks the c*omega0 register written in the se = 10 states.
module tb_apaim_lau;
  import apaim_pkg::*;
  import apaim_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, a_is_r = 0, lf0_we = 0, sigma_old = 0;
  instr_t instr;
  fp16_t lf0_wdata, j_in, c, omega0, lf_a, cw;
  int cnt_r = 0;

  apaim_lau dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s lf_a=%h", what, lf_a); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; c = 16'h3800; omega0 = 16'h4300; j_in = 0;
    @(negedge clk); rst_n = 1;
    lf0_wdata = 16'h3D00; lf0_we = 1; @(negedge clk); lf0_we = 0;   // 1.25
    init = 1; @(negedge clk); init = 0;
    a_is_r = 0; #1 chk(lf_a == 16'h3D00, "init left");
    a_is_r = 1; #1 chk(lf_a == 16'h3D00, "init right");
    // one hand-worked update: lf = 1.25, J = 0.5, sigma_old = -1 -> lf = 1.25 + 1.0 = 2.25 (0x4080)
    a_is_r = 0; j_in = 16'h3800; sigma_old = 0;
    instr.mode = 1; instr.lau_en = 1; @(negedge clk); instr = '0;
    chk(lf_a == 16'h4080, "hand update");
    for (int t = 0; t < 400; t++) begin
      fp16_t lf_prev, other;
      real expv, ulp, mag;
      a_is_r = 1'($urandom);
      #1 lf_prev = lf_a;
      a_is_r = ~a_is_r; #1 other = lf_a; a_is_r = ~a_is_r;
      j_in = {1'($urandom), 5'(11 + $urandom % 4), 10'($urandom)};
      sigma_old = 1'($urandom);
      instr.mode = 1; instr.read = 1;                 // LAU enable, delay 1: no update yet
      @(negedge clk);
      chk(lf_a == lf_prev, "no update without lau_en");
      instr.lau_en = 1; @(negedge clk); instr = '0;
      expv = fp2r(lf_prev) + (sigma_old ? -2.0 : 2.0) * fp2r(j_in);
      mag  = (fp2r(lf_prev) < 0 ? -fp2r(lf_prev) : fp2r(lf_prev));
      if (2.0 * (fp2r(j_in) < 0 ? -fp2r(j_in) : fp2r(j_in)) > mag) mag = 2.0 * (fp2r(j_in) < 0 ? -fp2r(j_in) : fp2r(j_in));
      ulp = mag / 1024.0 * 2.0;
      chk(fp2r(lf_a) - expv <= 35.0 * ulp && expv - fp2r(lf_a) <= 35.0 * ulp, "accumulate");
      a_is_r = ~a_is_r; #1 chk(lf_a == other, "other layer unchanged");
      if (a_is_r) cnt_r++;
    end
    // c * omega0 = 0.5 * 3.5 = 1.75 (0x3F00), only with se = 10 and mode = 0
    instr.se0 = 1; @(negedge clk);
    chk(cw != 16'h3F00, "cw not written with se = 01");
    instr = '0; instr.se1 = 1; @(negedge clk);
    chk(cw == 16'h3F00, "cw = c * omega0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
