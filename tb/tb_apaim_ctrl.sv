// tb_apaim_ctrl: walks the controller through every state and transition.
// Checks the instruction word of each state against the instruction table,
// the state sequence of a no-flip step (7 cycles), of a step with two flipped
// spins (5 + 5*2 cycles), the memory-write handshake, the init pulse, and the
// stop through finish and through anneal_en with the wait for the SOUU.
module tb_apaim_ctrl;
  import apaim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, wr_req = 0, ready = 0, anneal_en = 1, finish = 0, energy_done = 1;
  logic flip_pending;
  instr_t instr;
  logic init;
  state_t state;
  int cyc = 0;
  int pend_left = 0;

  apaim_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s state=%0d instr=%b t=%0t", what, state, instr, $time);
    end
  endtask

  // expected instruction word of each state (bit 11 first)
  function automatic logic [11:0] exp_instr(state_t s);
    case (s)
      S_IDLE:       return 12'b000000000000;
      S_MEM_WRITE:  return 12'b000000100000;
      S_SUU_EN:     return 12'b000000000010;
      S_STEP_ADD:   return 12'b000001000000;
      S_STEP_ADD_D: return 12'b000001000001;
      S_DDSS_EN0:   return 12'b000010001000;
      S_DDSS_EN0_D: return 12'b000110001000;
      S_LAU_EN:     return 12'b110000010000;
      S_LAU_EN_D1:  return 12'b110000010000;
      S_LAU_EN_D2:  return 12'b110000010100;
      S_DDSS_EN1:   return 12'b000000001000;
      S_DDSS_EN1_D: return 12'b000000001000;
      S_WAIT_ACC:   return 12'b000000000000;
      S_NO_FLIP:    return 12'b000011000000;
      S_NO_FLIP_D:  return 12'b001011000000;
      default:      return 12'hFFF;
    endcase
  endfunction

  // every cycle: instruction matches the state
  always @(negedge clk) if (rst_n) chk(instr == exp_instr(state), "instruction of state");

  // model of the DDSS status: pend_left flipped spins, one consumed per DDSS enable 1
  always @(posedge clk) begin
    if (state == S_DDSS_EN1 && pend_left > 0) pend_left <= pend_left - 1;
  end
  assign flip_pending = (pend_left > 0);

  task automatic expect_seq(state_t seq[$], string what);
    foreach (seq[i]) begin
      chk(state == seq[i], what);
      @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state == S_IDLE, "reset to idle");
    wr_req = 1; @(negedge clk); wr_req = 0;
    chk(state == S_MEM_WRITE, "memory write");
    repeat (3) begin @(negedge clk); chk(state == S_MEM_WRITE, "stay in memory write"); end
    ready = 1; @(negedge clk); ready = 0;
    chk(state == S_IDLE, "ready returns to idle");
    start = 1;
    #1 chk(init == 1, "init pulse on start");
    @(negedge clk); start = 0;
    chk(init == 0, "init one cycle");
    // step with no flip
    t0 = cyc;
    expect_seq('{S_SUU_EN, S_STEP_ADD, S_STEP_ADD_D, S_DDSS_EN0, S_DDSS_EN0_D, S_NO_FLIP, S_NO_FLIP_D}, "no-flip step");
    chk(state == S_SUU_EN && cyc - t0 == 7, "no-flip step takes 7 cycles");
    // step with two flipped spins
    pend_left = 2;
    t0 = cyc;
    expect_seq('{S_SUU_EN, S_STEP_ADD, S_STEP_ADD_D, S_DDSS_EN0, S_DDSS_EN0_D,
                 S_LAU_EN, S_LAU_EN_D1, S_LAU_EN_D2, S_DDSS_EN1, S_DDSS_EN1_D,
                 S_LAU_EN, S_LAU_EN_D1, S_LAU_EN_D2, S_DDSS_EN1, S_DDSS_EN1_D}, "two-flip step");
    chk(state == S_SUU_EN && cyc - t0 == 15, "two-flip step takes 15 cycles");
    // finish: SUU enable -> waiting accumulation, held until energy_done
    finish = 1; energy_done = 0;
    @(negedge clk);
    chk(state == S_WAIT_ACC, "finish stops annealing");
    repeat (4) begin @(negedge clk); chk(state == S_WAIT_ACC, "waits for energy"); end
    energy_done = 1; @(negedge clk);
    chk(state == S_IDLE, "back to idle");
    finish = 0;
    // anneal_en = 0 also stops
    start = 1; @(negedge clk); start = 0;
    anneal_en = 0;
    chk(state == S_SUU_EN, "restart");
    @(negedge clk);
    chk(state == S_WAIT_ACC, "anneal_en low stops");
    @(negedge clk);
    chk(state == S_IDLE, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
