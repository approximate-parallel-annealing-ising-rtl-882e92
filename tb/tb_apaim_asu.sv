// tb_apaim_asu: with T0 = 2, r = 0.5, T_inc = 0.25, c0 = 0, c_inc = 0.25,
// p0 = 0.5, p_dec = 0.1875 (all exact in fp16) checks the step counter, the
// layer selection, T = (T0 + dT) * r^(s-1), the dynamic offset rise and reset,
// the clamped linear c and p, and finish at s_max = 5.
module tb_apaim_asu;
  import apaim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0;
  instr_t instr;
  fp16_t t0 = 16'h4000, r = 16'h3800, t_inc = 16'h3400, c0 = 16'h0000, c_inc = 16'h3400;
  logic [15:0] p0 = 16'h8000, p_dec = 16'h3000, s_max = 16'd5;
  logic [15:0] step, p;
  logic a_is_r, finish;
  fp16_t temp, dt, c;

  apaim_asu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s step=%0d temp=%h dt=%h c=%h p=%h", what, step, temp, dt, c, p); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp16_t c_exp [5] = '{16'h3400, 16'h3800, 16'h3A00, 16'h3C00, 16'h3C00};
    logic [15:0] p_exp [5] = '{16'h5000, 16'h2000, 16'h0000, 16'h0000, 16'h0000};
    instr = '0;
    @(negedge clk); rst_n = 1;
    init = 1; @(negedge clk); init = 0;
    chk(step == 1 && !a_is_r && temp == 16'h4000 && !finish && c == 0 && p == 16'h8000, "after init");
    instr.step_add = 1; @(negedge clk); instr = '0;
    chk(step == 2 && a_is_r && temp == 16'h3C00, "step 2: T = 1");
    instr.noflip = 1; @(negedge clk); instr = '0;
    chk(dt == 16'h3400 && temp == 16'h3C80, "noflip: dT = 0.25, T = 1.125");
    instr.noflip = 1; @(negedge clk); instr = '0;
    chk(dt == 16'h3800 && temp == 16'h3D00, "noflip: dT = 0.5, T = 1.25");
    instr.rst_dynamic = 1; instr.mode = 1; @(negedge clk); instr = '0;
    chk(dt == 0 && temp == 16'h3C00, "rst_dynamic");
    for (int i = 0; i < 5; i++) begin
      instr.cs_update = 1; @(negedge clk); instr = '0;
      chk(c == c_exp[i] && p == p_exp[i], "linear c and p");
    end
    instr.step_add = 1; @(negedge clk); @(negedge clk);
    chk(step == 4 && temp == 16'h3400 && !finish, "step 4: T = 0.25");
    @(negedge clk); instr = '0;
    chk(step == 5 && finish && !a_is_r, "finish at s_max");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
