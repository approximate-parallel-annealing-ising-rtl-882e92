// apaim_souu: solution update unit.
//
// Keeps the best configuration found. The cycle after a spin update (sample)
// it takes a snapshot of a configuration sigma_in and of the per-spin energy
// terms lf_i * sigma_i of that configuration (from the SUUs: the layer that
// produced the local fields), if it is not busy, and then adds them up one per clock:
//     H = -1/2 * sum_i (lf_i * sigma_i + (h_i/2) * sigma_i)
// which is the Ising energy -sum_{i<j} J_ij s_i s_j - sum_i (h_i/2) s_i when
// lf_i = h_i/2 + sum_j J_ij s_j (N cycles, two exact fp16 adders; the halving
// is an exponent decrement). The fields h_i/2 are written by the host during
// initialisation. When the sum is complete the snapshot replaces the stored
// best configuration if H is lower, or if none is stored yet. A snapshot
// offered while busy is skipped.
// energy_done tells the controller that no accumulation is in progress.
// Computing an energy from the SUU energies and keeping the lowest follows the
// machine's description; the serial accumulation, the sign convention and the
// skip-when-busy rule are this design's choice.
module apaim_souu
  import apaim_pkg::*;
#(
  parameter int unsigned N = 64,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         sample,
  input  logic         hh_we,      // host write of h_i/2 for spin hh_row
  input  logic [AW-1:0] hh_row,
  input  fp16_t        hh_wdata,
  input  logic [N-1:0] sigma_in,
  input  fp16_t        energy [N],
  output logic [N-1:0] best_sigma,
  output fp16_t        best_energy,
  output logic         best_valid,
  output logic         energy_done
);

  logic [N-1:0]  snap_sigma;
  fp16_t         snap_e [N];
  fp16_t         hh [N];         // h_i / 2
  fp16_t         acc, acc_nxt, term, h_energy;
  logic [AW-1:0] cnt;
  logic          busy;

  // term = lf_i*s_i + (h_i/2)*s_i ; acc accumulates -term ; H = acc / 2
  fp16_add #(.L(0), .K(0)) u_term (.a(snap_e[cnt]), .b(fp_sgn(hh[cnt], snap_sigma[cnt])), .y(term));
  fp16_add #(.L(0), .K(0)) u_acc (.a(acc), .b(fp_neg(term)), .y(acc_nxt));

  always_comb begin
    h_energy = acc_nxt;
    if (acc_nxt[14:10] != 5'd0) h_energy[14:10] = acc_nxt[14:10] - 5'd1;
    if (acc_nxt[14:10] == 5'd1) h_energy = FP_ZERO;
  end

  always_ff @(posedge clk) begin
    if (hh_we) hh[hh_row] <= hh_wdata;
  end

  assign energy_done = !busy && !sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cnt         <= '0;
      acc         <= FP_ZERO;
      snap_sigma  <= '0;
      best_sigma  <= '0;
      best_energy <= FP_ZERO;
      best_valid  <= 1'b0;
      for (int i = 0; i < N; i++) snap_e[i] <= FP_ZERO;
    end else if (init) begin
      busy       <= 1'b0;
      best_valid <= 1'b0;
    end else if (busy) begin
      acc <= acc_nxt;
      cnt <= cnt + AW'(1);
      if (cnt == AW'(N - 1)) begin
        busy <= 1'b0;
        if (!best_valid || fp_lt(h_energy, best_energy)) begin
          best_sigma  <= snap_sigma;
          best_energy <= h_energy;
          best_valid  <= 1'b1;
        end
      end
    end else if (sample) begin
      busy       <= 1'b1;
      cnt        <= '0;
      acc        <= FP_ZERO;
      snap_sigma <= sigma_in;
      for (int i = 0; i < N; i++) snap_e[i] <= energy[i];
    end
  end

endmodule
