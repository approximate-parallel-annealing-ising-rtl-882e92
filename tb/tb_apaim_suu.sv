// tb_apaim_suu: checks the spin update rule. Negative energy change always
// flips; a large positive change at low temperature never flips; the omega
// term decides when lf alone would not; with dE/T = 1 and dE/T = 2 the flip
// rate over random numbers must be near exp(-1) and exp(-2). Also checks
// which layer is written, the flag, sigma_new and the energy lf*sigma_B.
module tb_apaim_suu;
  import apaim_pkg::*;
  import apaim_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, init_sigma = 1, a_is_r = 0;
  instr_t instr;
  fp16_t lf_a, omega, temp, energy;
  logic [15:0] rnd;
  logic sigma_l, sigma_r, sigma_new, flipped, sigma_e;

  apaim_suu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // one trial from a fresh init; returns the flag
  task automatic trial(output logic f);
    init = 1; @(negedge clk); init = 0;
    instr.suu_en = 1; @(negedge clk); instr.suu_en = 0;
    f = flipped;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic f;
    int n1, n2;
    instr = '0; omega = 0; temp = 16'h3C00; rnd = 16'h8000;
    @(negedge clk); rst_n = 1;
    // dE = 2*1*(-1) = -2 < 0: flips, left layer written
    init_sigma = 1; a_is_r = 0; lf_a = 16'hBC00;
    trial(f);
    chk(f && sigma_l == 0 && sigma_r == 1 && sigma_new == 0, "negative dE flips left");
    chk(energy == 16'hBC00 && sigma_e == 1, "energy = lf * sigma_B = (-1)(+1)");
    // right layer
    a_is_r = 1; trial(f);
    chk(f && sigma_r == 0 && sigma_l == 1, "right layer written");
    // large positive dE at T = 2^-10: never flips
    a_is_r = 0; lf_a = 16'h4400; temp = 16'h1400;
    for (int t = 0; t < 200; t++) begin
      rnd = 16'($urandom); trial(f);
      chk(!f && sigma_l == 1 && energy == 16'h4400, "no flip at low T");
    end
    // omega term: lf = -0.25, omega = 1, sigma_B = 1 -> dE = 2*(0.75) > 0
    lf_a = 16'hB400; omega = 16'h3C00; trial(f);
    chk(!f, "omega holds the spin");
    omega = 16'h0000; trial(f);
    chk(f, "without omega it flips");
    // dE/T = 1: lf = 0.5, T = 1
    lf_a = 16'h3800; temp = 16'h3C00; n1 = 0;
    for (int t = 0; t < 3000; t++) begin rnd = 16'($urandom); trial(f); n1 += int'(f); end
    // dE/T = 2: T = 0.5
    temp = 16'h3800; n2 = 0;
    for (int t = 0; t < 3000; t++) begin rnd = 16'($urandom); trial(f); n2 += int'(f); end
    $display("flip rate dE/T=1: %f (exp(-1)=0.368), dE/T=2: %f (exp(-2)=0.135)", n1 / 3000.0, n2 / 3000.0);
    chk(n1 > 1000 && n1 < 1250, "rate at dE/T = 1");
    chk(n2 > 330 && n2 < 480, "rate at dE/T = 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
