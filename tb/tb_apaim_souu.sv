// tb_apaim_souu: offers 60 random snapshots of spins and energies and checks
// that each accepted one is summed in N cycles (energy_done low meanwhile),
// that a snapshot offered while busy is skipped, and that the kept solution
// is the accepted snapshot with the lowest H = -1/2 sum (e_i + (h_i/2) s_i)
// (compared with a real-valued sum, within the fp16 accumulation error).
module tb_apaim_souu;
  import apaim_pkg::*;
  import apaim_tb_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, sample = 0, hh_we = 0;
  logic [2:0] hh_row = 0;
  fp16_t hh_wdata = 0;
  real hhr [N];
  logic [N-1:0] sigma_in, best_sigma;
  fp16_t energy [N];
  fp16_t best_energy;
  logic best_valid, energy_done;
  real best_ref;
  logic [N-1:0] best_ref_sigma;

  apaim_souu #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      hh_we = 1; hh_row = 3'(i); hh_wdata = {1'($urandom), 5'(13 + $urandom % 3), 10'($urandom)};
      hhr[i] = fp2r(hh_wdata);
      @(negedge clk);
    end
    hh_we = 0;
    init = 1; @(negedge clk); init = 0;
    chk(!best_valid && energy_done, "empty after init");
    best_ref = 1.0e9;
    for (int t = 0; t < 60; t++) begin
      real e;
      int busy_cyc;
      e = 0.0;
      sigma_in = N'($urandom);
      for (int i = 0; i < N; i++) begin
        energy[i] = {1'($urandom), 5'(13 + $urandom % 3), 10'($urandom)};
        e -= 0.5 * (fp2r(energy[i]) + (sigma_in[i] ? hhr[i] : -hhr[i]));
      end
      sample = 1; @(negedge clk); sample = 0;
      sigma_in = ~sigma_in;                 // offered while busy: must be ignored
      sample = 1; @(negedge clk); sample = 0;
      busy_cyc = 1;
      while (!energy_done) begin @(negedge clk); busy_cyc++; end
      chk(busy_cyc == N, "accumulation takes N cycles");
      if (e < best_ref) begin best_ref = e; best_ref_sigma = ~sigma_in; end
      chk(best_valid && best_sigma == best_ref_sigma, "best configuration");
      chk(fp2r(best_energy) - best_ref < 0.05 && best_ref - fp2r(best_energy) < 0.05, "best energy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
