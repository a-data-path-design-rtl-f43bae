// activation_unit: the transfer function at the end of a neuron, one cycle of latency.
//
// The weighted sum `v` (single precision) present while `en` is high is registered as
// f(v) on `y` and `en_out` rises in the next cycle. ACT selects the function:
//   ACT_PURELIN   f(v) = v
//   ACT_HARDLIM   f(v) = 1.0 if v >= 0, else 0.0
//   ACT_HARDLIMS  f(v) = 1.0 if v >= 0, else -1.0
// Both zeros count as v >= 0. A NaN is treated by its sign bit. PureLin, HardLim and the
// one-cycle latency follow the library description; the HardLims definition (symmetric
// hard limit) is this design's reading of the third neuron type the library lists.
// `rst` (synchronous, active high) clears `en_out` and `y`.
module activation_unit
  import ann_pkg::*;
#(
  parameter act_e ACT = ACT_PURELIN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  fp32_t v,
  output logic  en_out,
  output fp32_t y
);

  logic  nonneg;
  fp32_t f;

  always_comb begin
    nonneg = !v[31] || (v[30:0] == '0);
    unique case (ACT)
      ACT_HARDLIM:  f = nonneg ? FP_ONE : FP_ZERO;
      ACT_HARDLIMS: f = nonneg ? FP_ONE : FP_MINUS1;
      default:      f = v;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_out <= 1'b0;
      y      <= '0;
    end else begin
      en_out <= en;
      y      <= f;
    end
  end

endmodule
