// fp32_mul: pipelined IEEE-754 single-precision multiplier.
//
// Computes the conv_in x conv_weight product of the convolution loop body.
// Three register stages, one new operand pair per clock:
//   stage 1  unpack, 24x24-bit significand product, exponent sum, specials
//   stage 2  normalise the product to 1.xxx and form guard and sticky bits
//   stage 3  round to nearest, ties to even, and pack
// Latency is MUL_LAT = 3 cycles from a/b to y. There is no valid signal: the
// unit is a plain data pipeline and the caller tracks which slots are live.
// This design's choices: subnormal inputs are read as zero and results
// below the normal range flush to zero (signed); NaN in, or infinity x zero,
// gives the quiet NaN 7fc00000; overflow gives a signed infinity.
module fp32_mul
  import psp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  // ---- stage 1 -----------------------------------------------------------
  logic        s1_sign, s1_zero, s1_inf, s1_nan;
  logic [9:0]  s1_exp;   // signed, biased
  logic [47:0] s1_prod;

  always_ff @(posedge clk) begin
    logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_inf  = (a[30:23] == 8'hff) && (a[22:0] == '0);
    b_inf  = (b[30:23] == 8'hff) && (b[22:0] == '0);
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != '0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != '0);
    s1_sign <= a[31] ^ b[31];
    s1_nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    s1_inf  <= a_inf || b_inf;
    s1_zero <= a_zero || b_zero;
    s1_exp  <= {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    s1_prod <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
  end

  // ---- stage 2 -----------------------------------------------------------
  logic        s2_sign, s2_zero, s2_inf, s2_nan;
  logic [9:0]  s2_exp;
  logic [23:0] s2_mant;
  logic        s2_guard, s2_sticky;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_zero <= s1_zero;
    s2_inf  <= s1_inf;
    s2_nan  <= s1_nan;
    if (s1_prod[47]) begin
      s2_exp    <= s1_exp + 10'd1;
      s2_mant   <= s1_prod[47:24];
      s2_guard  <= s1_prod[23];
      s2_sticky <= |s1_prod[22:0];
    end else begin
      s2_exp    <= s1_exp;
      s2_mant   <= s1_prod[46:23];
      s2_guard  <= s1_prod[22];
      s2_sticky <= |s1_prod[21:0];
    end
  end

  // ---- stage 3 -----------------------------------------------------------
  always_ff @(posedge clk) begin
    logic [24:0] mant_r;
    logic [9:0]  exp_r;
    mant_r = {1'b0, s2_mant} + {24'd0, s2_guard & (s2_sticky | s2_mant[0])};
    exp_r  = s2_exp;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 10'd1;
    end
    if (s2_nan)
      y <= FP32_QNAN;
    else if (s2_inf)
      y <= {s2_sign, 8'hff, 23'd0};
    else if (s2_zero || exp_r[9] || exp_r == 10'd0)
      y <= {s2_sign, 31'd0};
    else if (exp_r >= 10'd255)
      y <= {s2_sign, 8'hff, 23'd0};
    else
      y <= {s2_sign, exp_r[7:0], mant_r[22:0]};
  end

endmodule
