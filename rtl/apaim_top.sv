// apaim_top: approximate parallel annealing Ising machine (APAIM) with N spins.
//
// Solves an Ising problem, typically a traveling-salesman problem with n
// cities mapped onto N = n*n spins, by improved parallel annealing on a
// two-layer spin model: all spins of one layer are updated at once against
// the local fields computed from the other layer, the layers alternate, and a
// self-interaction omega pulls each spin toward its replica. Units, one per
// spin unless noted: LAU (local fields, fp16 adder with the approximate
// LOTA-APPROX_L&APPROX_K mantissa adder), SIGU (omega), SUU (spin update),
// RNG (one per two spins); shared: ASU (steps, temperature), DDSS (streams
// flipped spins), memory block (J), SOUU (best solution) and the controller.
//
// Use: hold wr_req for a cycle to enter memory write; write words with wr_en,
// wr_sel (J[row][col], initial local field lf0[row] = h/2 + sum_j J*sigma0_j,
// base self-interaction omega0[row], half field h[row]/2 for the energy) and
// wr_data; raise ready to return to
// idle. Set the schedule inputs and init_sigma and pulse start. The machine
// runs s_max steps (or until anneal_en falls), waits for the SOUU and returns
// to idle; best_sigma / best_energy then hold the lowest-energy configuration
// seen. The schedule inputs must stay stable while annealing.
// A step costs 7 cycles when no spin flips and 5 + 5 * (flipped spins) cycles
// otherwise. Spin bit 1 = +1, 0 = -1; numbers are fp16 (see apaim_pkg).
module apaim_top
  import apaim_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned APPROX_L = 5,
  parameter int unsigned APPROX_K = 3,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host control
  input  logic          wr_req,
  input  logic          ready,
  input  logic          start,
  input  logic          anneal_en,
  // host data write (accepted in the memory write state)
  input  logic          wr_en,
  input  wr_sel_t       wr_sel,
  input  logic [AW-1:0] wr_row,
  input  logic [AW-1:0] wr_col,
  input  fp16_t         wr_data,
  // problem start and annealing schedule
  input  logic [N-1:0]  init_sigma,
  input  fp16_t         t0,
  input  fp16_t         r,
  input  fp16_t         t_inc,
  input  fp16_t         c0,
  input  fp16_t         c_inc,
  input  logic [15:0]   p0,
  input  logic [15:0]   p_dec,
  input  logic [15:0]   s_max,
  // results and status
  output logic [N-1:0]  sigma_l,
  output logic [N-1:0]  sigma_r,
  output logic [N-1:0]  best_sigma,
  output fp16_t         best_energy,
  output logic          best_valid,
  output logic [15:0]   step,
  output fp16_t         dt,           // dynamic temperature offset
  output fp16_t         temp,         // current temperature
  output instr_t        instr,
  output state_t        state
);

  logic          sample_q;
  logic          init, finish, flip_pending, energy_done, a_is_r, sigma_old;
  logic [AW-1:0] idx;
  fp16_t         c;
  logic [15:0]   p;
  logic [N-1:0]  sigma_new, flipped, sigma_e;
  fp16_t         jcol [N];
  fp16_t         energy [N];
  fp16_t         lf_a [N];
  fp16_t         cw [N];
  fp16_t         omega [N];
  fp16_t         omega0 [N];
  logic [15:0]   rnd [N];

  apaim_ctrl u_ctrl (
    .clk, .rst_n, .start, .wr_req, .ready, .anneal_en, .finish, .flip_pending,
    .energy_done, .instr, .init, .state
  );

  apaim_asu u_asu (
    .clk, .rst_n, .instr, .init, .t0, .r, .t_inc, .c0, .c_inc, .p0, .p_dec, .s_max,
    .step, .a_is_r, .finish, .temp, .dt, .c, .p
  );

  apaim_mem #(.N(N)) u_mem (
    .clk, .instr, .we(wr_en && wr_sel == WR_J), .wr_row, .wr_col, .wr_data,
    .rd_idx(idx), .rdata(jcol)
  );

  apaim_ddss #(.N(N)) u_ddss (
    .clk, .rst_n, .instr, .init, .sigma_new, .flipped, .idx, .sigma_old, .flip_pending
  );

  apaim_souu #(.N(N)) u_souu (
    .clk, .rst_n, .init, .sample(sample_q),
    .hh_we(instr.write && wr_en && wr_sel == WR_HHALF), .hh_row(wr_row), .hh_wdata(wr_data),
    .sigma_in(sigma_e), .energy,
    .best_sigma, .best_energy, .best_valid, .energy_done
  );

  // the SOUU samples the cycle after the spin update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample_q <= 1'b0;
    else        sample_q <= instr.suu_en;
  end

  for (genvar g = 0; g < N / 2; g++) begin : g_rng
    apaim_rng #(.SEED(32'h9E37_79B9 ^ (32'(g + 1) * 32'h0101_0F1D))) u_rng (
      .clk, .rst_n, .rnd0(rnd[2*g]), .rnd1(rnd[2*g+1])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_spin
    logic host_row;
    assign host_row = instr.write && wr_en && (wr_row == AW'(i));

    apaim_lau #(.L(APPROX_L), .K(APPROX_K)) u_lau (
      .clk, .rst_n, .instr, .init, .a_is_r,
      .lf0_we(host_row && wr_sel == WR_LF0), .lf0_wdata(wr_data),
      .j_in(jcol[i]), .sigma_old, .c, .omega0(omega0[i]),
      .lf_a(lf_a[i]), .cw(cw[i])
    );

    apaim_sigu u_sigu (
      .clk, .rst_n, .instr, .init,
      .w0_we(host_row && wr_sel == WR_OMEGA), .w0_wdata(wr_data),
      .cw(cw[i]), .rnd(rnd[i]), .p, .omega(omega[i]), .omega0(omega0[i])
    );

    apaim_suu u_suu (
      .clk, .rst_n, .instr, .init, .init_sigma(init_sigma[i]), .a_is_r,
      .lf_a(lf_a[i]), .omega(omega[i]), .temp, .rnd(rnd[i]),
      .sigma_l(sigma_l[i]), .sigma_r(sigma_r[i]), .sigma_new(sigma_new[i]),
      .flipped(flipped[i]), .sigma_e(sigma_e[i]), .energy(energy[i])
    );
  end

endmodule
