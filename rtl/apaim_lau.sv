// apaim_lau: local field accumulator unit of one spin i.
//
// Holds two local fields, one per layer of the two-layer model:
// lf[0] = h_i/2 + sum_j J_ij*sigma_j(right) is used to update the left-layer
// spin, lf[1] the same sum over left-layer spins is used to update the right one.
// Both start from the initial local field lf0 (written by the host during
// initialisation and copied on init). The update is delta-driven: when spin j
// of the layer just updated has flipped, the DDSS presents its old state and
// the memory presents J_ij, and on an instruction with mode = 1 and lau_en the
// field of the layer to be updated next (a_is_r) becomes
//     lf <- lf + J_ij * (sigma_new - sigma_old) = lf - 2 * sigma_old * J_ij
// through the fp16 adder with the approximate (LOTA-L&K) mantissa adder.
// The unit also forms c * omega0_i for the SIGU: it is registered while the
// select bits {se1,se0} are 2'b10 with mode = 0 (the DDSS-enable-0 states).
// Delta-driven accumulation and the approximate adder follow the machine's
// description; the two-register arrangement and the decode of se1/se0 are this
// design's reading of it. Updates take effect at the rising clock edge.
module apaim_lau
  import apaim_pkg::*;
#(
  parameter int unsigned L = 5,
  parameter int unsigned K = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  input  logic   init,
  input  logic   a_is_r,     // layer updated next: 0 = left, 1 = right
  input  logic   lf0_we,     // host write of the initial local field
  input  fp16_t  lf0_wdata,
  input  fp16_t  j_in,       // J_ij for the flipped spin j (memory block)
  input  logic   sigma_old,  // old state of the flipped spin j (DDSS)
  input  fp16_t  c,          // momentum scaling factor (ASU)
  input  fp16_t  omega0,     // base self-interaction (SIGU)
  output fp16_t  lf_a,       // local field for updating layer a_is_r
  output fp16_t  cw          // c * omega0, registered
);

  fp16_t lf [2];
  fp16_t lf0;
  fp16_t delta, sum;

  assign lf_a  = lf[a_is_r];
  assign delta = fp_x2(fp_sgn(j_in, ~sigma_old));

  fp16_add #(.L(L), .K(K)) u_add (.a(lf[a_is_r]), .b(delta), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lf[0] <= FP_ZERO;
      lf[1] <= FP_ZERO;
      lf0   <= FP_ZERO;
      cw    <= FP_ZERO;
    end else begin
      if (lf0_we) lf0 <= lf0_wdata;
      if (init) begin
        lf[0] <= lf0;
        lf[1] <= lf0;
      end else if (instr.mode && instr.lau_en) begin
        lf[a_is_r] <= sum;
      end
      if (!instr.mode && instr.se1 && !instr.se0) cw <= fp_mul(c, omega0);
    end
  end

endmodule
