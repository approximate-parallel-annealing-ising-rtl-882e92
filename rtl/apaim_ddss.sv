// apaim_ddss: delta-driven simultaneous spin update unit.
//
// After a parallel spin update the SUUs report, for every spin, whether it
// flipped. The DDSS turns that flag vector into a stream of single spins for
// the LAUs: it presents the index of the lowest flipped spin not yet processed
// (to the memory block, which returns that column of J) and the spin's old
// state (to the LAUs). flip_pending is the controller's status: 0 when no
// flipped spin is left.
// Timing: with ddss_en and se1 (DDSS enable 0 states) the flag vector is loaded;
// on the first cycle of ddss_en without se1 (DDSS enable 1) the spin just
// processed is removed, so holding the instruction for a delay cycle removes
// only one. Outputs are combinational from the flag register. Streaming only
// flipped spins follows the machine's description; the lowest-index-first
// order and the use of se1 to tell the two DDSS states apart are this design's.
module apaim_ddss
  import apaim_pkg::*;
#(
  parameter int unsigned N = 64,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  instr_t        instr,
  input  logic          init,
  input  logic [N-1:0]  sigma_new,  // new states of the layer just updated
  input  logic [N-1:0]  flipped,    // delta-s: 1 where the spin flipped
  output logic [AW-1:0] idx,
  output logic          sigma_old,
  output logic          flip_pending
);

  logic [N-1:0] mask;
  logic         en_q;

  always_comb begin
    idx = '0;
    for (int i = N - 1; i >= 0; i--) if (mask[i]) idx = AW'(i);
  end

  assign flip_pending = |mask;
  assign sigma_old    = ~sigma_new[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      en_q <= 1'b0;
    end else begin
      en_q <= instr.ddss_en;
      if (init) mask <= '0;
      else if (instr.ddss_en && instr.se1) mask <= flipped;
      else if (instr.ddss_en && !en_q) mask[idx] <= 1'b0;
    end
  end

endmodule
