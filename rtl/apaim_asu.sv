// apaim_asu: annealing schedule unit.
//
// Counts the annealing steps s (1 after init) and provides the schedule:
//   T = (T0 + dT) * r^(s-1)      exponential temperature with dynamic offset dT
//   dT <- dT + T_inc on noflip   (no spin flipped in a step)
//   dT <- 0 on rst_dynamic       (a spin flipped)
//   c  <- min(1, c + c_inc), p <- max(0, p - p_dec) on cs_update
// r^(s-1) is kept in a register multiplied by r on every step_add. finish is
// raised once s reaches s_max; a_is_r names the layer the next update acts on
// (left for odd s, right for even s). Step counting, the temperature function
// and the dynamic offset follow the algorithm; the linear c and p updates are
// this design's reading of "update p and c" and of the linear momentum factor.
// Registers change at the clock edge of the enabling instruction bit; T is
// combinational from them.
module apaim_asu
  import apaim_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  instr_t      instr,
  input  logic        init,
  input  fp16_t       t0,
  input  fp16_t       r,
  input  fp16_t       t_inc,
  input  fp16_t       c0,
  input  fp16_t       c_inc,
  input  logic [15:0] p0,
  input  logic [15:0] p_dec,
  input  logic [15:0] s_max,
  output logic [15:0] step,
  output logic        a_is_r,
  output logic        finish,
  output fp16_t       temp,
  output fp16_t       dt,
  output fp16_t       c,
  output logic [15:0] p
);

  fp16_t g, dt_sum, c_sum, t_base;

  fp16_add #(.L(0), .K(0)) u_dt (.a(dt), .b(t_inc), .y(dt_sum));
  fp16_add #(.L(0), .K(0)) u_c  (.a(c),  .b(c_inc), .y(c_sum));
  fp16_add #(.L(0), .K(0)) u_t  (.a(t0), .b(dt),    .y(t_base));

  assign temp   = fp_mul(t_base, g);
  assign a_is_r = ~step[0];
  assign finish = step >= s_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= 16'd1;
      g    <= FP_ONE;
      dt   <= FP_ZERO;
      c    <= FP_ZERO;
      p    <= '0;
    end else if (init) begin
      step <= 16'd1;
      g    <= FP_ONE;
      dt   <= FP_ZERO;
      c    <= c0;
      p    <= p0;
    end else begin
      if (instr.step_add) begin
        step <= step + 16'd1;
        g    <= fp_mul(g, r);
      end
      if (instr.rst_dynamic) dt <= FP_ZERO;
      else if (instr.noflip) dt <= dt_sum;
      if (instr.cs_update) begin
        c <= fp_lt(FP_ONE, c_sum) ? FP_ONE : c_sum;
        p <= (p > p_dec) ? p - p_dec : 16'd0;
      end
    end
  end

endmodule
