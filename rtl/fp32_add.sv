// fp32_add: pipelined IEEE-754 single-precision adder.
//
// Used in the Addition Unit of every neuron, where a tree of these sums the weighted
// stimuli. A new operand pair may be presented every clock cycle; the sum of the pair
// sampled at clock edge k is on `s` after edge k+LATENCY-1 (LATENCY = 8 by default, the
// latency the neuron library is built around). There is no handshake.
//
// How it works, one pipeline stage each: (1) register the operands; (2) order them by
// magnitude and take the exponent difference; (3) shift the smaller significand right
// by that difference, keeping guard, round and sticky bits; (4) add or subtract the
// aligned significands; (5) normalise, one place right or left by the leading-zero
// count; (6) round to nearest-even and pack. The remaining LATENCY-6 stages (two by
// default) are delay registers, free for the synthesis tool to retime. Subnormal inputs and results are flushed to zero, an exact zero sum
// is +0 unless both operands are negative, overflow gives a signed infinity,
// inf + (-inf) or a NaN operand gives a quiet NaN. The latency follows the library
// description; the stage split and the special-value rules are this design's choices.
module fp32_add
  import ann_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LAT
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  initial assert (LATENCY >= 6) else $error("fp32_add: LATENCY must be at least 6");

  // ---------------- stage 1: operand registers ----------------
  fp32_fields_t a1, b1;
  always_ff @(posedge clk) begin
    a1 <= a;
    b1 <= b;
  end

  // ---------------- stage 2: order by magnitude, classify ----------------
  fp32_fields_t op_hi, op_lo;
  logic         a_inf, b_inf, a_nan, b_nan;
  always_comb begin
    if (a1[30:0] >= b1[30:0]) begin
      op_hi = a1;
      op_lo = b1;
    end else begin
      op_hi = b1;
      op_lo = a1;
    end
    a_inf = (a1.exp == 8'hFF) && (a1.man == '0);
    b_inf = (b1.exp == 8'hFF) && (b1.man == '0);
    a_nan = (a1.exp == 8'hFF) && (a1.man != '0);
    b_nan = (b1.exp == 8'hFF) && (b1.man != '0);
  end

  logic        s2_sign_hi, s2_sub, s2_both_neg, s2_nan, s2_inf, s2_inf_sign;
  logic [7:0]  s2_exp, s2_ediff;
  logic [26:0] s2_man_hi, s2_man_lo;     // 24-bit significand + guard, round, sticky
  always_ff @(posedge clk) begin
    s2_sign_hi  <= op_hi.sign;
    s2_sub      <= op_hi.sign ^ op_lo.sign;
    s2_both_neg <= op_hi.sign & op_lo.sign;
    s2_exp      <= op_hi.exp;
    s2_ediff    <= op_hi.exp - op_lo.exp;
    // subnormals and zeros are flushed: their significand is taken as 0
    s2_man_hi   <= (op_hi.exp == 8'd0) ? 27'd0 : {1'b1, op_hi.man, 3'b000};
    s2_man_lo   <= (op_lo.exp == 8'd0) ? 27'd0 : {1'b1, op_lo.man, 3'b000};
    s2_nan      <= a_nan || b_nan || (a_inf && b_inf && (a1.sign != b1.sign));
    s2_inf      <= a_inf || b_inf;
    s2_inf_sign <= a_inf ? a1.sign : b1.sign;
  end

  // ---------------- stage 3: align the smaller significand ----------------
  logic [26:0] man_lo_sh;
  always_comb begin
    if (s2_ediff >= 8'd27) begin
      man_lo_sh = {26'd0, |s2_man_lo};
    end else begin
      man_lo_sh    = s2_man_lo >> s2_ediff;
      man_lo_sh[0] = man_lo_sh[0] | (|(s2_man_lo & ((27'd1 << s2_ediff) - 27'd1)));
    end
  end

  logic        s3_sign_hi, s3_sub, s3_both_neg, s3_nan, s3_inf, s3_inf_sign;
  logic [7:0]  s3_exp;
  logic [26:0] s3_man_hi, s3_man_lo;
  always_ff @(posedge clk) begin
    s3_sign_hi  <= s2_sign_hi;
    s3_sub      <= s2_sub;
    s3_both_neg <= s2_both_neg;
    s3_exp      <= s2_exp;
    s3_man_hi   <= s2_man_hi;
    s3_man_lo   <= man_lo_sh;
    s3_nan      <= s2_nan;
    s3_inf      <= s2_inf;
    s3_inf_sign <= s2_inf_sign;
  end

  // ---------------- stage 4: add or subtract ----------------
  logic        s4_sign, s4_both_neg, s4_nan, s4_inf, s4_inf_sign;
  logic [7:0]  s4_exp;
  logic [27:0] s4_sum;
  always_ff @(posedge clk) begin
    s4_sign     <= s3_sign_hi;
    s4_both_neg <= s3_both_neg;
    s4_exp      <= s3_exp;
    s4_nan      <= s3_nan;
    s4_inf      <= s3_inf;
    s4_inf_sign <= s3_inf_sign;
    s4_sum      <= s3_sub ? ({1'b0, s3_man_hi} - {1'b0, s3_man_lo})
                          : ({1'b0, s3_man_hi} + {1'b0, s3_man_lo});
  end

  // ---------------- stage 5: normalise ----------------
  logic [4:0]        lz;
  logic [27:0]       norm;
  logic signed [9:0] exp_n;
  always_comb begin
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) if (s4_sum[i]) lz = 5'(26 - i);
    if (s4_sum[27]) begin
      norm  = {1'b0, s4_sum[27:2], s4_sum[1] | s4_sum[0]};
      exp_n = $signed({2'b00, s4_exp}) + 10'sd1;
    end else begin
      norm  = s4_sum << lz;
      exp_n = $signed({2'b00, s4_exp}) - $signed({5'd0, lz});
    end
  end

  logic              s5_sign, s5_both_neg, s5_nan, s5_inf, s5_inf_sign, s5_zero;
  logic signed [9:0] s5_exp;
  logic [26:0]       s5_norm;   // [26:3] significand, [2] guard, [1:0] round and sticky
  always_ff @(posedge clk) begin
    s5_sign     <= s4_sign;
    s5_both_neg <= s4_both_neg;
    s5_nan      <= s4_nan;
    s5_inf      <= s4_inf;
    s5_inf_sign <= s4_inf_sign;
    s5_zero     <= (s4_sum == '0);
    s5_exp      <= exp_n;
    s5_norm     <= norm[26:0];
  end

  // ---------------- stage 6: round to nearest even and pack ----------------
  logic              round_up;
  logic [24:0]       mant_r;
  logic signed [9:0] exp_r;
  fp32_t             res6;
  always_comb begin
    round_up = s5_norm[2] && (s5_norm[1] || s5_norm[0] || s5_norm[3]);
    mant_r   = {1'b0, s5_norm[26:3]} + {24'd0, round_up};
    exp_r    = mant_r[24] ? s5_exp + 10'sd1 : s5_exp;

    if (s5_nan)                   res6 = FP_QNAN;
    else if (s5_inf)              res6 = {s5_inf_sign, 8'hFF, 23'd0};
    else if (s5_zero)             res6 = {s5_both_neg, 31'd0};
    else if (exp_r >= 10'sd255)   res6 = {s5_sign, 8'hFF, 23'd0};
    else if (exp_r <= 10'sd0)     res6 = {s5_sign, 31'd0};        // flush to zero
    else if (mant_r[24])          res6 = {s5_sign, exp_r[7:0], 23'd0};
    else                          res6 = {s5_sign, exp_r[7:0], mant_r[22:0]};
  end

  // stage 6 register, then LATENCY-6 further stages
  fp32_t pipe [LATENCY-5];
  always_ff @(posedge clk) begin
    pipe[0] <= res6;
    for (int i = 1; i < int'(LATENCY) - 5; i++) pipe[i] <= pipe[i-1];
  end

  assign s = pipe[LATENCY-6];

endmodule
