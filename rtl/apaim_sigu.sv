// apaim_sigu: self-interaction generating unit of one spin i.
//
// Produces the coupling omega_i between the spin and its replica in the other
// layer. On cs_update the unit draws a dropout: with probability p (a rand
// below p) omega_i is reset to zero, otherwise it takes c * omega0_i as computed
// by the LAU. omega0_i is written by the host during initialisation; omega_i is
// zero after init. The dropout rule is the algorithm's; representing p as a
// 16-bit fraction compared with a 16-bit uniform random number, and scaling a
// fixed base omega0 by c, are this design's choices.
// One-cycle register update at the clock edge.
module apaim_sigu
  import apaim_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  instr_t      instr,
  input  logic        init,
  input  logic        w0_we,
  input  fp16_t       w0_wdata,
  input  fp16_t       cw,       // c * omega0 from the LAU
  input  logic [15:0] rnd,      // uniform random number
  input  logic [15:0] p,        // dropout rate, fraction of 2^16
  output fp16_t       omega,
  output fp16_t       omega0
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      omega  <= FP_ZERO;
      omega0 <= FP_ZERO;
    end else begin
      if (w0_we) omega0 <= w0_wdata;
      if (init) omega <= FP_ZERO;
      else if (instr.cs_update) omega <= (rnd < p) ? FP_ZERO : cw;
    end
  end

endmodule
