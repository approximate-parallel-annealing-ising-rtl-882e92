// tb_apaim_full: end-to-end run of the APAIM on a random 8-city traveling-salesman
// problem (N = 64 spins, every parameter at its default, LOTA-5&3 adders). The testbench builds the Ising
// coefficients of the tour problem, loads J, the initial local fields and
// omega0 and h/2 through the host port, anneals for S_MAX steps and checks, while it
// runs:
//  - every step lasts 7 cycles without a flip and 5 + 5*k cycles with k flips;
//  - every flipped spin is streamed once by the DDSS (index, old state) and its
//    J column arrives from the memory;
//  - every LAU update equals old field - 2*sigma_old*J within the approximate
//    adder's error bound, and the fields stay close to h/2 + sum J*sigma;
//  - the run ends in idle after S_MAX steps with a solution stored. Whether
//    that solution is a valid tour is reported, not checked: with the
//    approximate adders the incrementally kept local fields drift (see README).
// It counts each mechanism (memory write, no-flip step with dT raise, dT reset,
// multi-flip step, omega dropout, SOUU improvement and skipped snapshot,
// waiting for the energy sum) and fails if one never happened.
module tb_apaim_full;
  import apaim_pkg::*;
  import apaim_tb_pkg::*;
  localparam int NC = 8;
  localparam int N  = NC * NC;
  localparam int AW = $clog2(N);
  localparam int S_MAX = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_req = 0, ready = 0, start = 0, anneal_en = 1, wr_en = 0;
  wr_sel_t wr_sel = WR_J;
  logic [AW-1:0] wr_row = 0, wr_col = 0;
  fp16_t wr_data = 0;
  logic [N-1:0] init_sigma = '0;
  fp16_t t0, r, t_inc, c0, c_inc;
  logic [15:0] p0, p_dec, s_max;
  logic [N-1:0] sigma_l, sigma_r, best_sigma;
  fp16_t best_energy, dt, temp;
  logic best_valid;
  logic [15:0] step;
  instr_t instr;
  state_t state;

  apaim_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (step %0d)", what, $time, step);
    end
  endtask

  // problem data
  real   d [];
  real   jr [];
  real   hr [];
  fp16_t jq [N][N];
  fp16_t lf0q [N];

  // mechanism counters
  int n_memwr = 0, n_noflip = 0, n_flipstep = 0, n_multiflip = 0, n_dtreset = 0;
  int n_drop = 0, n_improve = 0, n_skip = 0, n_wait = 0, n_lau = 0, n_steps = 0;

  initial begin
    #(64'd10 * 64'd4000000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitors ----------------
  int   step_start = 0, cyc = 0, k_flips = 0, lau_in_step = 0;
  logic in_step = 0;
  fp16_t lf_prev [N];
  logic prev_valid;
  fp16_t prev_best;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (instr.write && wr_en) n_memwr++;
    if (state == S_WAIT_ACC) n_wait++;
    if (instr.noflip) n_noflip++;
    if (state == S_LAU_EN && dt != 16'h0000) n_dtreset++;
    if (dut.u_souu.sample && !dut.u_souu.energy_done && dut.u_souu.busy) n_skip++;
    // step timing
    if (state == S_SUU_EN) begin
      if (in_step) begin
        chk(cyc - step_start == ((k_flips == 0) ? 7 : 5 + 5 * k_flips), "step cycle count");
        chk(lau_in_step == k_flips, "one LAU update per flipped spin");
      end
      in_step = 1;
      step_start = cyc;
      lau_in_step = 0;
    end
    if (state == S_STEP_ADD) begin
      k_flips = $countones(dut.flipped);
      n_steps++;
      if (k_flips == 0) ; else n_flipstep++;
      if (k_flips > 1) n_multiflip++;
    end
    // the LAU commit cycle: check DDSS, memory and every LAU
    if (state == S_LAU_EN_D2) begin
      int j;
      j = int'(dut.idx);
      chk(dut.flipped[j] == 1'b1, "DDSS streams a flipped spin");
      chk(dut.sigma_old == ~dut.sigma_new[j], "old state of the flipped spin");
      for (int i = 0; i < N; i++) begin
        chk(dut.jcol[i] == jq[i][j], "memory column");
        lf_prev[i] = dut.lf_a[i];
      end
      lau_in_step++;
      n_lau++;
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        real expv, mag, ulp, jv;
        jv   = fp2r(jq[i][j]);
        expv = fp2r(lf_prev[i]) + (dut.sigma_old ? -2.0 : 2.0) * jv;
        mag  = fp2r(lf_prev[i]); if (mag < 0) mag = -mag;
        if (2.0 * (jv < 0 ? -jv : jv) > mag) mag = 2.0 * (jv < 0 ? -jv : jv);
        ulp  = mag / 512.0;
        chk(fp2r(dut.lf_a[i]) - expv <= 35.0 * ulp && expv - fp2r(dut.lf_a[i]) <= 35.0 * ulp, "LAU update");
      end
    end
    // omega dropout after cs_update
    if (instr.cs_update) begin
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) if (dut.omega[i] == 16'h0000 && dut.cw[i] != 16'h0000) n_drop++;
    end
  end

  always @(posedge clk) begin
    prev_valid <= dut.best_valid;
    prev_best  <= dut.best_energy;
    if (dut.best_valid && (!prev_valid || dut.best_energy != prev_best)) n_improve++;
  end

  // local fields against h/2 + sum J*sigma of the other layer, at each SUU enable
  real max_drift = 0.0;
  always @(negedge clk) if (rst_n && state == S_SUU_EN && step > 1) begin
    for (int i = 0; i < N; i++) begin
      real ref_lf, err;
      logic [N-1:0] sb;
      sb = dut.a_is_r ? sigma_l : sigma_r;
      ref_lf = fp2r(lf0q[i]);
      for (int j = 0; j < N; j++) ref_lf += fp2r(jq[i][j]) * (2.0 * real'(sb[j]) - 2.0 * real'(init_sigma[j]));
      err = fp2r(dut.lf_a[i]) - ref_lf;
      if (err < 0) err = -err;
      if (err > max_drift) max_drift = err;
      chk(err < 0.05 + 0.02 * real'(n_lau), "local field tracks h/2 + sum J sigma");
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    real x [NC], y [NC], dmax, len;
    int  tour [NC];
    void'($urandom(11));
    d = new[NC * NC];
    dmax = 0.0;
    for (int i = 0; i < NC; i++) begin x[i] = $urandom % 1000 / 1000.0; y[i] = $urandom % 1000 / 1000.0; end
    for (int i = 0; i < NC; i++) for (int j = 0; j < NC; j++) begin
      d[i*NC + j] = $sqrt((x[i]-x[j])**2 + (y[i]-y[j])**2);
      if (d[i*NC + j] > dmax) dmax = d[i*NC + j];
    end
    for (int i = 0; i < NC * NC; i++) d[i] = d[i] / dmax;   // distances scaled to [0, 1]
    tsp_ising(NC, d, 1.0, 1.0, jr, hr);
    for (int i = 0; i < N; i++) begin
      real lf;
      for (int j = 0; j < N; j++) jq[i][j] = r2fp(jr[i*N + j]);
      lf = hr[i] / 2.0;
      for (int j = 0; j < N; j++) lf += fp2r(jq[i][j]) * (2.0 * real'(init_sigma[j]) - 1.0);
      lf0q[i] = r2fp(lf);
    end
    t0 = r2fp(2.0); r = r2fp(0.98); t_inc = r2fp(0.02);
    c0 = r2fp(0.0); c_inc = r2fp(1.0 / S_MAX); p0 = 16'h8000; p_dec = 16'(32768 / S_MAX);
    s_max = 16'(S_MAX);

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wr_req = 1; @(negedge clk); wr_req = 0;
    chk(state == S_MEM_WRITE, "memory write state");
    wr_en = 1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      wr_sel = WR_J; wr_row = AW'(i); wr_col = AW'(j); wr_data = jq[i][j];
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      wr_sel = WR_LF0; wr_row = AW'(i); wr_data = lf0q[i]; @(negedge clk);
      wr_sel = WR_OMEGA; wr_data = r2fp(3.0); @(negedge clk);
      wr_sel = WR_HHALF; wr_data = r2fp(hr[i] / 2.0); @(negedge clk);
    end
    wr_en = 0; ready = 1; @(negedge clk); ready = 0;
    chk(state == S_IDLE, "idle after ready");
    start = 1; @(negedge clk); start = 0;
    wait (state == S_IDLE);
    @(negedge clk);
    chk(step == 16'(S_MAX), "ran S_MAX steps");
    chk(best_valid, "solution stored");
    chk(n_steps == S_MAX - 1, "step count");
    chk(n_memwr == N * N + 3 * N, "all host words written");
    // report the best solution
    len = 0.0;
    for (int k = 0; k < NC; k++) begin
      tour[k] = -1;
      for (int i = 0; i < NC; i++) if (best_sigma[i*NC + k]) tour[k] = i;
    end
    if (tsp_valid(NC, 256'(best_sigma))) begin
      for (int k = 0; k < NC; k++) len += d[tour[k]*NC + tour[(k+1)%NC]];
      $display("best solution is a valid tour, length %f (distances scaled to [0,1])", len);
    end else
      $display("best solution violates the tour constraints");

    $display("best energy %f, final layers equal: %0d, max local-field drift %f", fp2r(best_energy), sigma_l == sigma_r, max_drift);
    $display("mechanisms: memwr=%0d noflip=%0d flipsteps=%0d multiflip=%0d lau=%0d dtreset=%0d drop=%0d improve=%0d skip=%0d wait=%0d",
             n_memwr, n_noflip, n_flipstep, n_multiflip, n_lau, n_dtreset, n_drop, n_improve, n_skip, n_wait);
    chk(n_noflip > 0, "no-flip step with dT raise happened");
    chk(n_dtreset > 0, "dT reset happened");
    chk(n_flipstep > 0 && n_multiflip > 0, "multi-flip steps happened");
    chk(n_drop > 0, "omega dropout happened");
    chk(n_improve > 0, "SOUU improvement happened");
    chk(n_skip > 0, "SOUU skipped a snapshot while busy");
    chk(n_wait > 0, "waiting accumulation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
