// fp32_add: pipelined IEEE-754 single-precision adder.
//
// Used twice in the convolution loop body: to accumulate result += product
// and to add the channel bias. Four register stages, one operand pair per
// clock:
//   stage 1  unpack, order the operands by magnitude, exponent difference
//   stage 2  align the smaller significand (guard, round and sticky bits)
//   stage 3  add or subtract, then normalise with a leading-zero count
//   stage 4  round to nearest, ties to even, and pack
// Latency is ADD_LAT = 4 cycles from a/b to y; no valid signal.
// This design's choices: subnormal inputs are read as zero, results below
// the normal range flush to zero, an exact zero sum is +0 unless both inputs
// are negative; NaN in, or +inf plus -inf, gives 7fc00000.
module fp32_add
  import psp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  // ---- stage 1 -----------------------------------------------------------
  logic        s1_big_sign, s1_sml_sign, s1_inf, s1_nan, s1_inf_sign;
  logic [7:0]  s1_big_exp;
  logic [7:0]  s1_diff;
  logic [23:0] s1_big_m, s1_sml_m;

  always_ff @(posedge clk) begin
    logic        a_inf, b_inf, a_nan, b_nan, swap;
    logic [23:0] am, bm;
    a_inf = (a[30:23] == 8'hff) && (a[22:0] == '0);
    b_inf = (b[30:23] == 8'hff) && (b[22:0] == '0);
    a_nan = (a[30:23] == 8'hff) && (a[22:0] != '0);
    b_nan = (b[30:23] == 8'hff) && (b[22:0] != '0);
    // subnormals are read as zero
    am = (a[30:23] == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    bm = (b[30:23] == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    swap = (b[30:0] > a[30:0]);
    s1_nan      <= a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]));
    s1_inf      <= a_inf || b_inf;
    s1_inf_sign <= a_inf ? a[31] : b[31];
    s1_big_sign <= swap ? b[31] : a[31];
    s1_sml_sign <= swap ? a[31] : b[31];
    s1_big_exp  <= swap ? b[30:23] : a[30:23];
    s1_diff     <= swap ? (b[30:23] - a[30:23]) : (a[30:23] - b[30:23]);
    s1_big_m    <= swap ? bm : am;
    s1_sml_m    <= swap ? am : bm;
  end

  // ---- stage 2 -----------------------------------------------------------
  logic        s2_sign, s2_sub, s2_inf, s2_nan, s2_inf_sign, s2_both_neg;
  logic [7:0]  s2_exp;
  logic [26:0] s2_big, s2_sml;  // 1.23 significand + guard, round, sticky

  always_ff @(posedge clk) begin
    logic [49:0] wide;
    logic [26:0] sml;
    wide = {s1_sml_m, 26'd0} >> s1_diff;
    if (s1_diff > 8'd26)
      sml = {26'd0, |s1_sml_m};
    else
      sml = {wide[49:24], |wide[23:0]};
    s2_sign     <= s1_big_sign;
    s2_sub      <= s1_big_sign ^ s1_sml_sign;
    s2_both_neg <= s1_big_sign & s1_sml_sign;
    s2_inf      <= s1_inf;
    s2_nan      <= s1_nan;
    s2_inf_sign <= s1_inf_sign;
    s2_exp      <= s1_big_exp;
    s2_big      <= {s1_big_m, 3'b000};
    s2_sml      <= sml;
  end

  // ---- stage 3 -----------------------------------------------------------
  logic        s3_sign, s3_zero, s3_inf, s3_nan, s3_inf_sign;
  logic [9:0]  s3_exp;   // signed, biased
  logic [26:0] s3_norm;  // 1.23 significand + guard, round, sticky

  always_ff @(posedge clk) begin
    logic [27:0] sum;
    logic [4:0]  lz;
    sum = s2_sub ? ({1'b0, s2_big} - {1'b0, s2_sml})
                 : ({1'b0, s2_big} + {1'b0, s2_sml});
    lz = 5'd0;
    for (int i = 0; i <= 26; i++)
      if (sum[i]) lz = 5'(26 - i);
    s3_inf      <= s2_inf;
    s3_nan      <= s2_nan;
    s3_inf_sign <= s2_inf_sign;
    s3_zero     <= (sum == 28'd0);
    s3_sign     <= (sum == 28'd0) ? s2_both_neg : s2_sign;
    if (sum[27]) begin
      s3_norm <= {sum[27:2], sum[1] | sum[0]};
      s3_exp  <= {2'b00, s2_exp} + 10'd1;
    end else begin
      s3_norm <= sum[26:0] << lz;
      s3_exp  <= {2'b00, s2_exp} - {5'd0, lz};
    end
  end

  // ---- stage 4 -----------------------------------------------------------
  always_ff @(posedge clk) begin
    logic [24:0] mant_r;
    logic [9:0]  exp_r;
    logic        rnd;
    rnd    = s3_norm[2] & (s3_norm[1] | s3_norm[0] | s3_norm[3]);
    mant_r = {1'b0, s3_norm[26:3]} + {24'd0, rnd};
    exp_r  = s3_exp;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 10'd1;
    end
    if (s3_nan)
      y <= FP32_QNAN;
    else if (s3_inf)
      y <= {s3_inf_sign, 8'hff, 23'd0};
    else if (s3_zero || exp_r[9] || exp_r == 10'd0)
      y <= {s3_sign, 31'd0};
    else if (exp_r >= 10'd255)
      y <= {s3_sign, 8'hff, 23'd0};
    else
      y <= {s3_sign, exp_r[7:0], mant_r[22:0]};
  end

endmodule
