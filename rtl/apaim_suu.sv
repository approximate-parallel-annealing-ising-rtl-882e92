// apaim_suu: spin update unit of one spin i (both layers).
//
// Holds the spin in the left and right layers. On suu_en it updates the spin of
// the active layer A (a_is_r: 0 = left, 1 = right; B is the other layer):
//     dE = 2 * sigma_A * (lf + omega * sigma_B)
//     flip when exp(-dE/T) > rand, computed as dE < T * (-ln u)
// with u the 16-bit random number read as a fraction. -ln u is approximated:
// with z leading zeros, u = 2^-(z+1) * (1 + f) and -log2 u ~ (z+1) - f
// (linear between powers of two), scaled by ln 2. A negative dE always flips
// (the probability is min(1, .)). The unit registers its flip flag (delta-s for
// the DDSS) and the new spin state of the updated layer. For the SOUU it
// registers the energy term lf * sigma_B together with sigma_B: lf is the field
// produced by layer B, so these terms give the exact Ising energy of the
// layer-B configuration. Arithmetic uses exact fp16 addition.
// dE and the acceptance rule are the algorithm's; the comparison against
// T * (-ln u) and the piecewise-linear logarithm are this design's choice.
// All outputs are registers updated at the suu_en clock edge; init loads
// init_sigma into both layers.
module apaim_suu
  import apaim_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  instr_t      instr,
  input  logic        init,
  input  logic        init_sigma,
  input  logic        a_is_r,
  input  fp16_t       lf_a,     // local field for layer A (LAU)
  input  fp16_t       omega,    // self-interaction (SIGU)
  input  fp16_t       temp,     // temperature T (ASU)
  input  logic [15:0] rnd,
  output logic        sigma_l,
  output logic        sigma_r,
  output logic        sigma_new,
  output logic        flipped,
  output logic        sigma_e,   // spin state the energy term belongs to (sigma_B)
  output fp16_t       energy
);

  logic  sa, sb, flip;
  fp16_t t_sum, de, neglog, thr;
  logic [4:0]  z;
  logic [15:0] ush, x;

  assign sa = a_is_r ? sigma_r : sigma_l;
  assign sb = a_is_r ? sigma_l : sigma_r;

  fp16_add #(.L(0), .K(0)) u_add (.a(lf_a), .b(fp_sgn(omega, sb)), .y(t_sum));

  always_comb begin
    de = fp_x2(fp_sgn(t_sum, sa));
    z  = 5'd16;
    for (int i = 0; i < 16; i++) if (rnd[i]) z = 5'(15 - i);
    ush = (z == 5'd16) ? 16'd0 : (rnd << (z + 5'd1));
    x   = {1'b0, (z + 5'd1), 10'd0} - {6'd0, ush[15:6]};
    neglog = fp_mul(fp_from_ufix10(x), FP_LN2);
    thr  = fp_mul(temp, neglog);
    flip = fp_lt(de, thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sigma_l   <= 1'b0;
      sigma_r   <= 1'b0;
      sigma_new <= 1'b0;
      flipped   <= 1'b0;
      sigma_e   <= 1'b0;
      energy    <= FP_ZERO;
    end else if (init) begin
      sigma_l   <= init_sigma;
      sigma_r   <= init_sigma;
      sigma_new <= init_sigma;
      flipped   <= 1'b0;
      sigma_e   <= init_sigma;
      energy    <= FP_ZERO;
    end else if (instr.suu_en) begin
      if (a_is_r) sigma_r <= sa ^ flip;
      else        sigma_l <= sa ^ flip;
      sigma_new <= sa ^ flip;
      flipped   <= flip;
      sigma_e   <= sb;
      energy    <= fp_sgn(lf_a, sb);
    end
  end

endmodule
