// apaim_ctrl: the machine's control unit, a 15-state finite state machine.
//
// Each state drives a fixed 12-bit instruction (instr_t) whose bits enable the
// registers of the other units and steer the LAU and the memory. The states and
// their instructions follow the machine's instruction table. The delay states
// hold an instruction for a second cycle so that the sampled status signals are
// settled; the enable of a unit is raised in one cycle only, so every register
// update happens exactly once per pass.
//   idle -> memory write (wr_req) -> idle (ready)        initialisation
//   idle -> SUU enable (start)                           annealing begins
//   SUU enable -> waiting accumulation (finish or !anneal_en) -> idle (energy_done)
//   SUU enable -> step adding -> delay -> DDSS enable 0 -> delay
//       -> no flip -> delay -> SUU enable                (no spin flipped)
//       -> LAU enable -> delay 1 -> delay 2 -> DDSS enable 1 -> delay
//             -> LAU enable (another flipped spin) or SUU enable
// Status inputs: flip_pending is 1 while the DDSS still holds a flipped spin
// (the machine's "empty" status, where empty = 0 means no flipped spin);
// finish from the ASU; energy_done from the SOUU. The exact arrows of the
// transition diagram are reconstructed from the state descriptions. Two
// points are this design's choice: the step-adding delay state also raises
// step_add (the table does not set bit 0 there, although step adding must
// advance the ASU once per step), and init is a one-cycle pulse on
// the idle -> SUU enable transition that loads the initial state of all units.
// One state per clock; instruction is a registered-state decode (Moore).
module apaim_ctrl
  import apaim_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,        // begin annealing (from idle)
  input  logic   wr_req,       // host wants to write the memory (from idle)
  input  logic   ready,        // host has written all data
  input  logic   anneal_en,    // 0 stops annealing at the next SUU enable
  input  logic   finish,       // ASU: last step reached
  input  logic   flip_pending, // DDSS: a flipped spin is still to be processed
  input  logic   energy_done,  // SOUU: no energy accumulation in progress
  output instr_t instr,
  output logic   init,         // one-cycle load of initial values
  output state_t state
);

  state_t nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      S_IDLE:       if (wr_req) nxt = S_MEM_WRITE; else if (start) nxt = S_SUU_EN;
      S_MEM_WRITE:  if (ready) nxt = S_IDLE;
      S_SUU_EN:     nxt = (finish || !anneal_en) ? S_WAIT_ACC : S_STEP_ADD;
      S_STEP_ADD:   nxt = S_STEP_ADD_D;
      S_STEP_ADD_D: nxt = S_DDSS_EN0;
      S_DDSS_EN0:   nxt = S_DDSS_EN0_D;
      S_DDSS_EN0_D: nxt = flip_pending ? S_LAU_EN : S_NO_FLIP;
      S_LAU_EN:     nxt = S_LAU_EN_D1;
      S_LAU_EN_D1:  nxt = S_LAU_EN_D2;
      S_LAU_EN_D2:  nxt = S_DDSS_EN1;
      S_DDSS_EN1:   nxt = S_DDSS_EN1_D;
      S_DDSS_EN1_D: nxt = flip_pending ? S_LAU_EN : S_SUU_EN;
      S_NO_FLIP:    nxt = S_NO_FLIP_D;
      S_NO_FLIP_D:  nxt = S_SUU_EN;
      S_WAIT_ACC:   if (energy_done) nxt = S_IDLE;
      default:      nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= nxt;
  end

  assign init = (state == S_IDLE) && !wr_req && start;

  always_comb begin
    unique case (state)
      S_IDLE:       instr = 12'b0000_0000_0000;
      S_MEM_WRITE:  instr = 12'b0000_0010_0000;
      S_SUU_EN:     instr = 12'b0000_0000_0010;
      S_STEP_ADD:   instr = 12'b0000_0100_0000;
      S_STEP_ADD_D: instr = 12'b0000_0100_0001;
      S_DDSS_EN0:   instr = 12'b0000_1000_1000;
      S_DDSS_EN0_D: instr = 12'b0001_1000_1000;
      S_LAU_EN:     instr = 12'b1100_0001_0000;
      S_LAU_EN_D1:  instr = 12'b1100_0001_0000;
      S_LAU_EN_D2:  instr = 12'b1100_0001_0100;
      S_DDSS_EN1:   instr = 12'b0000_0000_1000;
      S_DDSS_EN1_D: instr = 12'b0000_0000_1000;
      S_WAIT_ACC:   instr = 12'b0000_0000_0000;
      S_NO_FLIP:    instr = 12'b0000_1100_0000;
      S_NO_FLIP_D:  instr = 12'b0010_1100_0000;
      default:      instr = 12'b0000_0000_0000;
    endcase
  end

endmodule
