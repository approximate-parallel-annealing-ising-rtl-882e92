// tb_apaim_adder_sweep: solution quality of the 64-spin machine (8-city TSP)
// with each adder configuration of the evaluation: accurate adders (AccA),
// TruA-3, TruA-4, LOA-4, LOA-5, LOA-6, LOTA-4&3 and LOTA-5&3.
//
// One apaim_top per configuration is instantiated, all at N = 64 and driven by
// the same host port, so every machine loads the same problem and starts in
// the same cycle. NP random 8-city problems (distances scaled to [0, 1]) are
// run one after the other through the normal host sequence: memory write,
// start, run to S_MAX steps, waiting accumulation, idle. The second and later
// problems reuse the machines without a reset, so they also check that init
// clears the previous solution.
//
// Checks, for every configuration and problem:
//  - the machine returns to idle after exactly S_MAX steps with a solution;
//  - with accurate adders, the stored best energy matches the Ising energy of
//    the stored spins, recomputed here from the loaded coefficients, within
//    the truncation of a 64-term fp16 sum (N ulps of the result, plus 0.05).
// It reports, per configuration, the violation rate (share of runs whose
// best solution is not a valid tour), the mean tour length of the valid runs
// and the largest gap between stored and recomputed energy. These figures
// are printed, not checked: with incrementally kept fields the approximate
// adders drift (see the README), the SOUU then scores configurations with
// drifted fields, and the outcome depends on the schedule.
module tb_apaim_adder_sweep;
  import apaim_pkg::*;
  import apaim_tb_pkg::*;
  localparam int NC    = 8;
  localparam int N     = NC * NC;
  localparam int AW    = $clog2(N);
  localparam int S_MAX = 300;
  localparam int NP    = 4;
  localparam int NCFG  = 8;
  localparam int CFG_L [NCFG] = '{0, 3, 4, 4, 5, 6, 4, 5};
  localparam int CFG_K [NCFG] = '{0, 3, 4, 0, 0, 0, 3, 3};
  localparam string CFG_NAME [NCFG] =
    '{"AccA", "TruA-3", "TruA-4", "LOA-4", "LOA-5", "LOA-6", "LOTA-4&3", "LOTA-5&3"};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_req = 0, ready = 0, start = 0, anneal_en = 1, wr_en = 0;
  wr_sel_t wr_sel = WR_J;
  logic [AW-1:0] wr_row = 0, wr_col = 0;
  fp16_t wr_data = 0;
  logic [N-1:0] init_sigma = '0;
  fp16_t t0, r, t_inc, c0, c_inc;
  logic [15:0] p0, p_dec, s_max;

  logic [N-1:0] sigma_l [NCFG], sigma_r [NCFG], best_sigma [NCFG];
  fp16_t        best_energy [NCFG], dt [NCFG], temp [NCFG];
  logic         best_valid [NCFG];
  logic [15:0]  step [NCFG];
  instr_t       instr [NCFG];
  state_t       state [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    apaim_top #(.APPROX_L(CFG_L[g]), .APPROX_K(CFG_K[g])) dut (
      .clk, .rst_n, .wr_req, .ready, .start, .anneal_en,
      .wr_en, .wr_sel, .wr_row, .wr_col, .wr_data, .init_sigma,
      .t0, .r, .t_inc, .c0, .c_inc, .p0, .p_dec, .s_max,
      .sigma_l(sigma_l[g]), .sigma_r(sigma_r[g]),
      .best_sigma(best_sigma[g]), .best_energy(best_energy[g]), .best_valid(best_valid[g]),
      .step(step[g]), .dt(dt[g]), .temp(temp[g]), .instr(instr[g]), .state(state[g])
    );
  end

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(64'd10 * 64'd2000000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic all_idle();
    for (int g = 0; g < NCFG; g++) if (state[g] != S_IDLE) return 1'b0;
    return 1'b1;
  endfunction

  // problem data
  real   d [];
  real   jr [];
  real   hr [];
  fp16_t jq [N][N];
  fp16_t hq [N];
  fp16_t lf0q [N];
  int    n_valid [NCFG];
  real   sum_len [NCFG];
  real   max_gap [NCFG];

  initial begin
    void'($urandom(2024));
    foreach (n_valid[g]) begin n_valid[g] = 0; sum_len[g] = 0.0; max_gap[g] = 0.0; end
    t0 = r2fp(2.0); r = r2fp(0.98); t_inc = r2fp(0.02);
    c0 = r2fp(0.0); c_inc = r2fp(1.0 / S_MAX); p0 = 16'h8000; p_dec = 16'(32768 / S_MAX);
    s_max = 16'(S_MAX);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int prob = 0; prob < NP; prob++) begin
      real x [NC], y [NC], dmax;
      d = new[NC * NC];
      dmax = 0.0;
      for (int i = 0; i < NC; i++) begin x[i] = $urandom % 1000 / 1000.0; y[i] = $urandom % 1000 / 1000.0; end
      for (int i = 0; i < NC; i++) for (int j = 0; j < NC; j++) begin
        d[i*NC + j] = $sqrt((x[i]-x[j])**2 + (y[i]-y[j])**2);
        if (d[i*NC + j] > dmax) dmax = d[i*NC + j];
      end
      for (int i = 0; i < NC * NC; i++) d[i] = d[i] / dmax;
      tsp_ising(NC, d, 1.0, 1.0, jr, hr);
      for (int i = 0; i < N; i++) init_sigma[i] = 1'($urandom % 2);
      for (int i = 0; i < N; i++) begin
        real lf;
        for (int j = 0; j < N; j++) jq[i][j] = r2fp(jr[i*N + j]);
        hq[i] = r2fp(hr[i] / 2.0);
        lf = hr[i] / 2.0;
        for (int j = 0; j < N; j++) lf += fp2r(jq[i][j]) * (2.0 * real'(init_sigma[j]) - 1.0);
        lf0q[i] = r2fp(lf);
      end

      // load the problem into every machine
      wr_req = 1; @(negedge clk); wr_req = 0;
      wr_en = 1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        wr_sel = WR_J; wr_row = AW'(i); wr_col = AW'(j); wr_data = jq[i][j];
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        wr_sel = WR_LF0; wr_row = AW'(i); wr_data = lf0q[i]; @(negedge clk);
        wr_sel = WR_OMEGA; wr_data = r2fp(3.0); @(negedge clk);
        wr_sel = WR_HHALF; wr_data = hq[i]; @(negedge clk);
      end
      wr_en = 0; ready = 1; @(negedge clk); ready = 0;
      chk(all_idle(), "idle after ready");

      // anneal
      start = 1; @(negedge clk); start = 0;
      @(negedge clk);
      while (!all_idle()) @(negedge clk);
      @(negedge clk);

      for (int g = 0; g < NCFG; g++) begin
        real e_ref, e_hw, tol, len, gap, ulp;
        int  tour [NC];
        chk(step[g] == 16'(S_MAX), "ran S_MAX steps");
        chk(best_valid[g], "solution stored");
        // Ising energy of the stored spins: -sum_{i<j} J s_i s_j - sum_i (h_i/2) s_i
        e_ref = 0.0;
        for (int i = 0; i < N; i++) begin
          real si;
          si = best_sigma[g][i] ? 1.0 : -1.0;
          e_ref -= fp2r(hq[i]) * si;
          for (int j = i + 1; j < N; j++)
            e_ref -= fp2r(jq[i][j]) * si * (best_sigma[g][j] ? 1.0 : -1.0);
        end
        e_hw = fp2r(best_energy[g]);
        gap = (e_hw > e_ref) ? e_hw - e_ref : e_ref - e_hw;
        if (gap > max_gap[g]) max_gap[g] = gap;
        if (CFG_L[g] == 0) begin
          // one fp16 ulp at the magnitude of the sum, per accumulated term
          ulp = 1.0 / 1024.0;
          while (ulp * 1024.0 * 2.0 <= (e_ref < 0 ? -e_ref : e_ref)) ulp = ulp * 2.0;
          tol = real'(N) * ulp + 0.05;
          chk(gap <= tol, "best energy matches the stored spins");
          if (gap > tol) $display("  problem %0d: stored energy %f, recomputed %f", prob, e_hw, e_ref);
        end
        if (tsp_valid(NC, 256'(best_sigma[g]))) begin
          len = 0.0;
          for (int k = 0; k < NC; k++) begin
            tour[k] = 0;
            for (int i = 0; i < NC; i++) if (best_sigma[g][i*NC + k]) tour[k] = i;
          end
          for (int k = 0; k < NC; k++) len += d[tour[k]*NC + tour[(k+1)%NC]];
          n_valid[g]++;
          sum_len[g] += len;
        end
      end
    end

    $display("adder       VR      mean valid tour length   largest energy gap");
    for (int g = 0; g < NCFG; g++)
      $display("%-10s  %3.0f %%   %-22s   %f", CFG_NAME[g], 100.0 * real'(NP - n_valid[g]) / real'(NP),
               n_valid[g] > 0 ? $sformatf("%f", sum_len[g] / real'(n_valid[g])) : "-", max_gap[g]);
    $display("(%0d problems of %0d cities, %0d steps; tour lengths with distances scaled to [0,1])", NP, NC, S_MAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
