// lota_adder: lower-part-OR and truncated adder (LOTA-L&K) for mantissa addition.
//
// The W-bit addition a + b is split at bit L. The upper W-L bits use an exact
// carry-propagate adder. Of the L lower bits, the K least significant ones are
// truncated (forced to 0) and the remaining L-K bits are the bitwise OR of the
// operands. As in a lower-part-OR adder, the carry into the exact part is the
// AND of the two operands' bit L-1 when that bit is an OR bit; when all lower
// bits are truncated no carry is passed up.
//   L = K = 0 : exact adder (cin is used)
//   L = K = k : truncated adder TruA-k
//   K = 0     : lower-part-OR adder LOA-L
// The split and the three special cases follow the LOTA scheme of the machine;
// the carry input (used only by the exact adder, for subtraction) is this
// design's own addition. Purely combinational.
module lota_adder #(
  parameter int unsigned W = 12,  // adder width
  parameter int unsigned L = 5,   // approximated low bits
  parameter int unsigned K = 3    // truncated low bits (K <= L)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum        // sum[W] is the carry out
);

  initial begin
    assert (K <= L && L <= W) else $error("lota_adder: need K <= L <= W");
  end

  localparam int unsigned LM = (L > 0) ? L - 1 : 0;  // top bit of the low part

  logic [W:0] upper;
  logic       c_up;

  always_comb begin
    if (L == 0)      c_up = cin;
    else if (L > K)  c_up = a[LM] & b[LM];
    else             c_up = 1'b0;
    upper = ({1'b0, a} >> L) + ({1'b0, b} >> L) + (W+1)'(c_up);
    sum = upper << L;
    for (int i = 0; i < W; i++) begin
      if (i < int'(K))      sum[i] = 1'b0;
      else if (i < int'(L)) sum[i] = a[i] | b[i];
    end
  end

endmodule
