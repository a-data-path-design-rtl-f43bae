// output_layer: optional result registers behind the last neuron layer.
//
// In the cycle `en` (the last layer's enable output) is high the N results `d` are
// captured into `q`; `valid` rises in the next cycle, for one cycle, and `q` holds
// its value until the next capture, so a slow reader can take the results at leisure.
// `rst` (synchronous, active high) clears `q` and `valid`. Registers on the outputs
// follow the network description; the one-cycle `valid` pulse is this design's choice.
module output_layer
  import ann_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  fp32_t d [N],
  output fp32_t q [N],
  output logic  valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) q[i] <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) q <= d;
    end
  end

endmodule
