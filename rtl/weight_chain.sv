// weight_chain: the Register Unit of a neuron, a serially loaded chain of weight registers.
//
// Every cycle `load` is high the chain shifts by one word: w[0] takes `weight_in` and
// w[i] takes w[i-1]. The last register drives `weight_out`, so the chains of all the
// neurons of a network can be joined end to end and the whole network's weights
// pushed in through one 32-bit input. A value pushed in first therefore ends up in the
// last register of the last neuron. The registers hold their value while `load` is low.
// `rst` (synchronous, active high) clears every register to +0.0.
// The chain and its single load strobe follow the library description; the reset value
// is this design's choice.
module weight_chain
  import ann_pkg::*;
#(
  parameter int unsigned N = 4     // registers in the chain (weights plus optional bias)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  fp32_t weight_in,
  output fp32_t w [N],
  output fp32_t weight_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) w[i] <= '0;
    end else if (load) begin
      w[0] <= weight_in;
      for (int i = 1; i < int'(N); i++) w[i] <= w[i-1];
    end
  end

  assign weight_out = w[N-1];

endmodule
