// fp16_add: 16-bit floating-point adder with an approximate mantissa adder.
//
// Format 1/5/10 (see apaim_pkg). The operand of larger magnitude (op_hi) is found, the
// other significand (hidden one plus 10 mantissa bits) is shifted right by the
// exponent difference with the shifted-out bits dropped, and the two 11-bit
// significands are added or, for opposite signs, subtracted by adding the
// one's complement plus a carry in. That significand addition is done by a
// lota_adder with L approximated and K truncated low bits, the place where the
// machine applies approximation. The sum is normalised with a leading-zero
// shift (an approximate difference of nearly equal significands can come out
// negative; it is then negated and the sign flipped). The result is truncated,
// flushes to zero below the smallest normal number and saturates at the
// largest magnitude.
// Only the approximate mantissa addition comes from the machine's description;
// alignment, normalisation and rounding are this design's choice.
// Purely combinational.
module fp16_add
  import apaim_pkg::*;
#(
  parameter int unsigned L = 5,
  parameter int unsigned K = 3
) (
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  localparam int unsigned W = 12;

  fp16_t       op_hi, op_lo;
  logic [4:0]  ediff;
  logic [10:0] sig_b, sig_s;
  logic [10:0] sig_s_al;
  logic        sub;
  logic [W-1:0] opa, opb;
  logic [W:0]  sum;

  always_comb begin
    if (a[14:0] >= b[14:0]) begin
      op_hi = a; op_lo = b;
    end else begin
      op_hi = b; op_lo = a;
    end
    sig_b = {1'b1, op_hi[9:0]};
    sig_s = (op_lo[14:10] == 5'd0) ? 11'd0 : {1'b1, op_lo[9:0]};
    ediff = op_hi[14:10] - op_lo[14:10];
    sig_s_al = (ediff > 5'd10) ? 11'd0 : (sig_s >> ediff);
    sub = op_hi[15] ^ op_lo[15];
    opa = {1'b0, sig_b};
    opb = sub ? ~{1'b0, sig_s_al} : {1'b0, sig_s_al};
  end

  lota_adder #(.W(W), .L(L), .K(K)) u_mant (
    .a(opa), .b(opb), .cin(sub), .sum(sum)
  );

  logic [W-1:0] r;
  logic [W-1:0] rn;
  int           lz;
  logic signed [6:0] e;

  logic sgn;

  always_comb begin
    r   = sum[W-1:0];
    sgn = op_hi[15];
    // an approximate difference of nearly equal significands can come out
    // negative: take its magnitude and flip the sign
    if (sub && r[W-1]) begin
      r   = -r;
      sgn = ~sgn;
    end
    rn = '0;
    lz = 0;
    e  = $signed({2'b00, op_hi[14:10]});
    y  = FP_ZERO;
    if (op_hi[14:10] == 5'd0) begin
      y = FP_ZERO;
    end else if (!sub && r[11]) begin
      // carry out of the significand: shift right one place
      e = e + 7'sd1;
      y = (e > 7'sd31) ? {sgn, FP_MAX[14:0]} : {sgn, e[4:0], r[10:1]};
    end else if (r[10:0] == '0) begin
      y = FP_ZERO;
    end else begin
      for (int i = 10; i >= 0; i--) if (r[i] && lz == 0) lz = 11 - i;
      lz = lz - 1;                    // leading zeros below bit 10
      rn = r << lz;
      e  = e - 7'(lz);
      y  = (e < 7'sd1) ? FP_ZERO : {sgn, e[4:0], rn[9:0]};
    end
  end

endmodule
