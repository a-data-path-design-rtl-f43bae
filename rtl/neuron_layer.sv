// neuron_layer: a fully connected layer of N_NEURONS identical library neurons.
//
// Every neuron sees the same N_IN stimuli `x`, so neuron k computes
// y[k] = f(sum_j w_kj * x_j). The neurons' weight chains are joined in order: the
// layer's `weight_in` feeds neuron 0, neuron k's chain feeds neuron k+1, and the last
// neuron's chain drives `weight_out`, ready to be joined to the next layer. All neurons
// of a layer are of one type and so share one latency (25 cycles for four inputs, 17
// for two); `en_out` is taken from neuron 0 and marks the cycle in which all of `y` is
// valid. Timing is that of `neuron`: raise `en` with the stimuli, results LATENCY
// cycles later, one stimulus set per cycle at most.
// Same-type layers and the chained weight registers follow the network structure of
// the library description; full connection is the structure of its example network.
module neuron_layer
  import ann_pkg::*;
#(
  parameter int unsigned N_NEURONS = 4,
  parameter int unsigned N_IN      = 4,
  parameter act_e        ACT       = ACT_PURELIN,
  parameter bit          BIAS      = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  fp32_t weight_in,
  output fp32_t weight_out,
  input  logic  en,
  input  fp32_t x [N_IN],
  output logic  en_out,
  output fp32_t y [N_NEURONS]
);

  fp32_t chain [N_NEURONS+1];
  logic  en_o  [N_NEURONS];

  assign chain[0] = weight_in;

  for (genvar k = 0; k < int'(N_NEURONS); k++) begin : g_neu
    neuron #(.N_IN(N_IN), .ACT(ACT), .BIAS(BIAS)) u_neuron (
      .clk, .rst, .load,
      .weight_in (chain[k]),
      .weight_out(chain[k+1]),
      .en, .x,
      .en_out    (en_o[k]),
      .y         (y[k])
    );
  end

  assign weight_out = chain[N_NEURONS];
  assign en_out     = en_o[0];

endmodule
