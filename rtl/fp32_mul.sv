// fp32_mul: pipelined IEEE-754 single-precision multiplier.
//
// Used in the Multiplication Unit of every neuron, one per stimulus input. A new
// operand pair may be presented every clock cycle; the product of the pair sampled at
// clock edge k is on `p` after edge k+LATENCY-1 (LATENCY = 8 by default, the latency the
// neuron library is built around). There is no handshake: the neuron tracks valid data
// in its own enable pipeline.
//
// How it works, one pipeline stage each: (1) register the operands; (2) unpack them and
// form the 48-bit significand product; (3) normalise by at most one place and collect
// guard and sticky bits; (4) round to nearest-even and pack. The remaining LATENCY-4
// stages (four by default) are plain delay registers, free for the synthesis tool to
// retime into the 24x24-bit product, which is the longest path. Subnormal inputs and
// results are flushed to zero, an overflow gives a signed infinity, and 0*inf or a NaN
// operand gives a quiet NaN. The 8-cycle latency follows the library description; the stage
// split, the flush-to-zero and the special-value rules are this design's choices.
module fp32_mul
  import ann_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LAT
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  initial assert (LATENCY >= 4) else $error("fp32_mul: LATENCY must be at least 4");

  // ---------------- stage 1: operand registers ----------------
  fp32_fields_t a1, b1;
  always_ff @(posedge clk) begin
    a1 <= a;
    b1 <= b;
  end

  // ---------------- stage 2: unpack and multiply significands ----------------
  logic              a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  always_comb begin
    a_zero = (a1.exp == 8'd0);
    b_zero = (b1.exp == 8'd0);
    a_inf  = (a1.exp == 8'hFF) && (a1.man == '0);
    b_inf  = (b1.exp == 8'hFF) && (b1.man == '0);
    a_nan  = (a1.exp == 8'hFF) && (a1.man != '0);
    b_nan  = (b1.exp == 8'hFF) && (b1.man != '0);
  end

  logic               s2_sign, s2_zero, s2_inf, s2_nan;
  logic signed [9:0]  s2_exp;
  logic [47:0]        s2_prod;
  always_ff @(posedge clk) begin
    s2_sign <= a1.sign ^ b1.sign;
    s2_nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    s2_inf  <= a_inf || b_inf;
    s2_zero <= a_zero || b_zero;
    s2_exp  <= $signed({2'b00, a1.exp}) + $signed({2'b00, b1.exp}) - 10'sd127;
    s2_prod <= {1'b1, a1.man} * {1'b1, b1.man};
  end

  // ---------------- stage 3: normalise ----------------
  logic              s3_sign, s3_zero, s3_inf, s3_nan;
  logic signed [9:0] s3_exp;
  logic [23:0]       s3_mant;
  logic              s3_guard, s3_sticky;
  always_ff @(posedge clk) begin
    s3_sign <= s2_sign;
    s3_zero <= s2_zero;
    s3_inf  <= s2_inf;
    s3_nan  <= s2_nan;
    if (s2_prod[47]) begin
      s3_mant   <= s2_prod[47:24];
      s3_guard  <= s2_prod[23];
      s3_sticky <= |s2_prod[22:0];
      s3_exp    <= s2_exp + 10'sd1;
    end else begin
      s3_mant   <= s2_prod[46:23];
      s3_guard  <= s2_prod[22];
      s3_sticky <= |s2_prod[21:0];
      s3_exp    <= s2_exp;
    end
  end

  // ---------------- stage 4: round to nearest even and pack ----------------
  logic              round_up;
  logic [24:0]       mant_r;
  logic signed [9:0] exp_r;
  fp32_t             res4;
  always_comb begin
    round_up = s3_guard && (s3_sticky || s3_mant[0]);
    mant_r   = {1'b0, s3_mant} + {24'd0, round_up};
    exp_r    = mant_r[24] ? s3_exp + 10'sd1 : s3_exp;   // 1.11..1 rounded up to 10.00..0

    if (s3_nan)                    res4 = FP_QNAN;
    else if (s3_inf)               res4 = {s3_sign, 8'hFF, 23'd0};
    else if (s3_zero)              res4 = {s3_sign, 31'd0};
    else if (exp_r >= 10'sd255)    res4 = {s3_sign, 8'hFF, 23'd0};
    else if (exp_r <= 10'sd0)      res4 = {s3_sign, 31'd0};        // flush to zero
    else if (mant_r[24])           res4 = {s3_sign, exp_r[7:0], 23'd0};
    else                           res4 = {s3_sign, exp_r[7:0], mant_r[22:0]};
  end

  // stage 4 register, then LATENCY-4 further stages
  fp32_t pipe [LATENCY-3];
  always_ff @(posedge clk) begin
    pipe[0] <= res4;
    for (int i = 1; i < int'(LATENCY) - 3; i++) pipe[i] <= pipe[i-1];
  end

  assign p = pipe[LATENCY-4];

endmodule
