// tb_lota_adder: checks the lower-part-OR and truncated adder in four settings
// (default LOTA-5&3, exact, TruA-4, LOA-4) against a bit-by-bit reference and
// against the error bounds of each scheme: TruA never overestimates, all
// errors stay below 2^L, the exact adder equals a + b + cin.
module tb_lota_adder;
  localparam int W = 12;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   s_lota, s_ex, s_tru, s_loa;
  int           n_err_lota = 0;

  lota_adder dut (.a, .b, .cin, .sum(s_lota));
  lota_adder #(.W(W), .L(0), .K(0)) u_ex  (.a, .b, .cin, .sum(s_ex));
  lota_adder #(.W(W), .L(4), .K(4)) u_tru (.a, .b, .cin, .sum(s_tru));
  lota_adder #(.W(W), .L(4), .K(0)) u_loa (.a, .b, .cin, .sum(s_loa));

  function automatic logic [W:0] ref_add(logic [W-1:0] x, logic [W-1:0] y, logic ci, int l, int k);
    logic [W:0] r;
    int carry, hi;
    r = '0;
    for (int i = 0; i < l; i++) r[i] = (i < k) ? 1'b0 : (x[i] | y[i]);
    carry = (l == 0) ? int'(ci) : (l > k ? int'(x[l-1] & y[l-1]) : 0);
    hi = int'(x >> l) + int'(y >> l) + carry;
    r = r | ((W+1)'(hi) << l);
    return r;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h cin=%b", what, a, b, cin);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked case: a=0x3A7, b=0x15B, LOTA-5&3
    // low bits 4..3: (00111 | 11011) = 11111 -> bits 4:3 = 11, bits 2:0 = 0 -> 0x18
    // carry = a[4]&b[4] = 0&1 = 0 ; upper = (0x3A7>>5)+(0x15B>>5) = 0x1D+0x0A = 0x27 -> 0x4E0
    a = 12'h3A7; b = 12'h15B; cin = 0;
    #1;
    chk(s_lota == 13'h4F8, "hand case");
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      #1;
      chk(s_lota == ref_add(a, b, cin, 5, 3), "lota ref");
      chk(s_ex == (W+1)'(a) + (W+1)'(b) + (W+1)'(cin), "exact");
      chk(s_tru == ref_add(a, b, cin, 4, 4) && s_tru <= (W+1)'(a) + (W+1)'(b), "trua");
      chk(s_loa == ref_add(a, b, cin, 4, 0), "loa");
      chk((int'(s_loa) - int'(a) - int'(b) < 16) && (int'(a) + int'(b) - int'(s_loa) < 16), "loa bound");
      if (s_lota != s_ex && !cin) n_err_lota++;
    end
    chk(n_err_lota > 1000, "approximation present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
