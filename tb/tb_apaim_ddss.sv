// tb_apaim_ddss: loads random flip vectors as the DDSS-enable-0 state does and
// then steps through DDSS-enable-1 pairs (instruction held two cycles). Checks
// that the indexes of all flipped spins come out once each, lowest first, with
// the negated new state as old state, and that flip_pending falls after the
// last one; an all-zero vector gives no pending spin.
module tb_apaim_ddss;
  import apaim_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0;
  instr_t instr;
  logic [N-1:0] sigma_new, flipped;
  logic [3:0] idx;
  logic sigma_old, flip_pending;

  apaim_ddss #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s idx=%0d", what, idx); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] f;
      f = (t == 0) ? '0 : N'($urandom) & N'($urandom);
      flipped = f; sigma_new = N'($urandom);
      instr = '0; instr.ddss_en = 1; instr.se1 = 1;       // DDSS enable 0 and its delay
      @(negedge clk); @(negedge clk);
      instr = '0;
      chk(flip_pending == (f != 0), "pending after load");
      for (int i = 0; i < N; i++) if (f[i]) begin
        chk(flip_pending && idx == 4'(i), "next index");
        chk(sigma_old == ~sigma_new[i], "old state");
        @(negedge clk);                                 // LAU states
        instr.ddss_en = 1;                              // DDSS enable 1 and its delay
        @(negedge clk); @(negedge clk);
        instr = '0;
      end
      chk(!flip_pending, "empty at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
