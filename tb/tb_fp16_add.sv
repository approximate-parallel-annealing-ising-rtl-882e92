// tb_fp16_add: checks the fp16 adder. An exact instance (L = K = 0) must give
// the truncated true sum on hand-worked cases and within two units of the last
// place on random operands; the default LOTA-5&3 instance must stay within
// (2^L + 3) units of the larger operand's last place, and its mean relative
// error over random same-sign operands must be small but not zero.
module tb_fp16_add;
  import apaim_tb_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, yx;
  real sum_rel = 0.0;
  int  n_add = 0, n_diff = 0;

  fp16_add dut (.a, .b, .y);
  fp16_add #(.L(0), .K(0)) u_ex (.a, .b, .y(yx));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h y=%h yx=%h", what, a, b, y, yx);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'h3C00; b = 16'h3C00; #1; chk(yx == 16'h4000 && y == 16'h4000, "1+1=2");
    a = 16'h3E00; b = 16'hB800; #1; chk(yx == 16'h3C00, "1.5-0.5=1");
    a = 16'h4200; b = 16'hC200; #1; chk(yx == 16'h0000 && y[14:10] < 5'd10, "3-3=0");
    a = 16'h4500; b = 16'h0000; #1; chk(yx == 16'h4500 && y == 16'h4500, "x+0");
    a = 16'h3C01; b = 16'h1000; #1; chk(yx == 16'h3C01, "tiny addend dropped");
    a = 16'hC100; b = 16'h3C00; #1; chk(yx == 16'hBE00, "-2.5+1=-1.5");
    for (int t = 0; t < 20000; t++) begin
      real ra, rb, ideal, ulp, big;
      a = {1'($urandom), 5'(8 + $urandom % 14), 10'($urandom)};
      b = {1'($urandom), 5'(8 + $urandom % 14), 10'($urandom)};
      #1;
      ra = fp2r(a); rb = fp2r(b); ideal = ra + rb;
      big = (ra < 0 ? -ra : ra) > (rb < 0 ? -rb : rb) ? ra : rb;
      ulp = pow2((int'((a[14:0] > b[14:0]) ? a[14:10] : b[14:10])) - 25);
      chk((fp2r(yx) - ideal <= 2.0 * ulp) && (ideal - fp2r(yx) <= 2.0 * ulp), "exact bound");
      chk((fp2r(y) - ideal <= 35.0 * ulp) && (ideal - fp2r(y) <= 35.0 * ulp), "lota bound");
      if (a[15] == b[15]) begin
        sum_rel += (fp2r(y) - ideal < 0 ? ideal - fp2r(y) : fp2r(y) - ideal) / (ideal < 0 ? -ideal : ideal);
        n_add++;
        if (y != yx) n_diff++;
      end
    end
    $display("same-sign MRED %f, differs from exact in %0d of %0d", sum_rel / n_add, n_diff, n_add);
    chk(sum_rel / n_add < 0.01, "MRED small");
    chk(n_diff > n_add / 4, "approximation active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
