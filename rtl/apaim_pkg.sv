// apaim_pkg: types, constants and arithmetic helpers shared by the APAIM blocks.
//
// Numbers are 16-bit floating point: 1 sign bit, 5 exponent bits (bias 15) and
// 10 mantissa bits, as in the machine's coefficient format. This design's own
// simplifications of that format: a zero exponent field means zero (no
// subnormals), exponent 31 is an ordinary exponent (no infinity or NaN), results
// are truncated toward zero and saturate at the largest finite magnitude.
//
// The 12-bit controller instruction is a packed struct whose field order is the
// bit order of the instruction word (bit 11 = mode ... bit 0 = step_add).
// Spins are one bit each: 1 stands for +1 and 0 for -1.
package apaim_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP_ZERO = 16'h0000;
  localparam fp16_t FP_ONE  = 16'h3C00;
  localparam fp16_t FP_LN2  = 16'h398C;  // 0.6931
  localparam fp16_t FP_MAX  = 16'h7FFF;  // largest magnitude (exponent 31 is finite here)

  typedef struct packed {
    logic mode;        // 11: LAU computation mode (1 = local-field accumulation)
    logic rst_dynamic; // 10: clear the dynamic temperature offset
    logic noflip;      //  9: no spin flipped in this step: raise the offset
    logic cs_update;   //  8: update c (and p, and the self-interaction)
    logic se1;         //  7: LAU select bit 1
    logic se0;         //  6: LAU select bit 0
    logic write;       //  5: memory write
    logic read;        //  4: memory read
    logic ddss_en;     //  3: DDSS register update
    logic lau_en;      //  2: LAU register update
    logic suu_en;      //  1: SUU register update
    logic step_add;    //  0: ASU register update (next annealing step)
  } instr_t;

  typedef enum logic [3:0] {
    S_IDLE        = 4'd0,
    S_MEM_WRITE   = 4'd1,
    S_SUU_EN      = 4'd2,
    S_STEP_ADD    = 4'd3,
    S_STEP_ADD_D  = 4'd4,
    S_DDSS_EN0    = 4'd5,
    S_DDSS_EN0_D  = 4'd6,
    S_LAU_EN      = 4'd7,
    S_LAU_EN_D1   = 4'd8,
    S_LAU_EN_D2   = 4'd9,
    S_DDSS_EN1    = 4'd10,
    S_DDSS_EN1_D  = 4'd11,
    S_WAIT_ACC    = 4'd12,
    S_NO_FLIP     = 4'd13,
    S_NO_FLIP_D   = 4'd14
  } state_t;

  // Host write selector: what a word written during initialisation goes to.
  typedef enum logic [1:0] {
    WR_J     = 2'd0,  // coupling J[row][col] into the memory block
    WR_LF0   = 2'd1,  // initial local field of spin 'row'
    WR_OMEGA = 2'd2,  // base self-interaction omega0 of spin 'row'
    WR_HHALF = 2'd3   // half external field h/2 of spin 'row' (energy sum)
  } wr_sel_t;

  function automatic fp16_t fp_neg(fp16_t a);
    return (a[14:0] == '0) ? FP_ZERO : {~a[15], a[14:0]};
  endfunction

  // Sign applied by a spin: s = 1 keeps a, s = 0 negates it.
  function automatic fp16_t fp_sgn(fp16_t a, logic s);
    return s ? a : fp_neg(a);
  endfunction

  // Multiply by two: exponent plus one, saturating.
  function automatic fp16_t fp_x2(fp16_t a);
    if (a[14:10] == 5'd0) return FP_ZERO;
    if (a[14:10] == 5'd31) return {a[15], FP_MAX[14:0]};
    return {a[15], a[14:10] + 5'd1, a[9:0]};
  endfunction

  // a < b on values (+0 and -0 equal).
  function automatic logic fp_lt(fp16_t a, fp16_t b);
    logic signed [16:0] ka, kb;
    ka = (a[14:10] == 5'd0) ? 17'sd0 : (a[15] ? -$signed({2'b00, a[14:0]}) : $signed({2'b00, a[14:0]}));
    kb = (b[14:10] == 5'd0) ? 17'sd0 : (b[15] ? -$signed({2'b00, b[14:0]}) : $signed({2'b00, b[14:0]}));
    return ka < kb;
  endfunction

  // Floating-point product, truncated.
  function automatic fp16_t fp_mul(fp16_t a, fp16_t b);
    logic        s;
    logic [21:0] prod;
    logic signed [7:0] e;
    logic [9:0]  m;
    s = a[15] ^ b[15];
    if (a[14:10] == 5'd0 || b[14:10] == 5'd0) return FP_ZERO;
    prod = {1'b1, a[9:0]} * {1'b1, b[9:0]};
    e = $signed({3'b000, a[14:10]}) + $signed({3'b000, b[14:10]}) - 8'sd15;
    if (prod[21]) begin
      m = prod[20:11];
      e = e + 8'sd1;
    end else begin
      m = prod[19:10];
    end
    if (e < 8'sd1) return FP_ZERO;
    if (e > 8'sd31) return {s, FP_MAX[14:0]};
    return {s, e[4:0], m};
  endfunction

  // Unsigned fixed-point number with 10 fraction bits (value < 64) to fp16.
  function automatic fp16_t fp_from_ufix10(logic [15:0] x);
    logic [15:0] sh;
    int          msb;
    msb = -1;
    for (int i = 0; i < 16; i++) if (x[i]) msb = i;
    if (msb < 0) return FP_ZERO;
    sh = x << (15 - msb);
    return {1'b0, 5'(msb + 5), sh[14:5]};
  endfunction

endpackage
