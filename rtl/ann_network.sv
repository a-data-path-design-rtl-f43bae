// ann_network: a feed-forward network of library neurons, built layer by layer.
//
// The network has an input register layer with SIZES[0] stimuli, N_LAYERS fully
// connected neuron layers (layer l has SIZES[l+1] neurons of SIZES[l] inputs, transfer
// function ACTS[l], bias BIASES[l]), and an output register layer holding the last
// layer's SIZES[N_LAYERS] results. All data are IEEE-754 single precision. The
// defaults give the 4-4-2 PureLin network that predicts concrete compressive and
// tensile strength from amount of cement, amount of water, consistency and temperature.
//
// Weights: every neuron's weight registers sit on one chain, pushed in through
// `data_in` with `load` high, one word per cycle. The chain runs through the neurons of
// layer 0 in order, then layer 1, and so on; each neuron holds w_0..w_{n-1} (then its
// bias). The first word pushed therefore lands in the last register of the last neuron
// of the last layer. `weight_out` is the end of the chain. For the default network
// that is 24 words: layer-0 neuron k holds chain words 4k..4k+3, layer-1 neuron m holds
// 16+4m..16+4m+3.
//
// Stimuli: with SERIAL_INPUT = 1 (default) they are shifted in through the same
// `data_in` with `load_in` high (the first word lands in the last input register); with
// SERIAL_INPUT = 0 they are taken from `par_in` in the cycle `en` is high. Raising `en`
// starts a computation. The results appear on `data_out` with `en_out` high for one
// cycle, 1 + (sum of the layer latencies) + 1 cycles after `en`: 52 for the default
// network (two layers of 25). The output registers are optional: with OUTPUT_REGS = 0
// the last layer drives `data_out` directly, one cycle earlier, and the value is only
// good in the `en_out` cycle. The pipeline accepts a new stimulus set every cycle in
// parallel mode; in serial mode the shifting takes SIZES[0] cycles per set.
//
// The layered structure, the shared chain, the optional input/output registers, the
// serial or parallel input registers and the default sizes follow the document's
// network description and example. Full connection between consecutive layers, the
// parameter set, separate load strobes and the synchronous active-high reset are this
// design's choices. Every SIZES[l] feeding a layer must be a power of two (2 or 4 in
// the neuron library).
module ann_network
  import ann_pkg::*;
#(
  parameter bit           SERIAL_INPUT = 1'b1,
  parameter bit           OUTPUT_REGS  = 1'b1,
  parameter int unsigned  N_LAYERS     = 2,
  parameter layer_sizes_t SIZES        = '{4, 4, 2, 0, 0, 0, 0, 0, 0},
  parameter layer_acts_t  ACTS         = '{ACT_PURELIN, ACT_PURELIN, ACT_PURELIN, ACT_PURELIN,
                                          ACT_PURELIN, ACT_PURELIN, ACT_PURELIN, ACT_PURELIN},
  parameter layer_bias_t  BIASES       = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t data_in,                     // shared data/weight input
  input  logic  load,                        // shift the weight chain
  input  logic  load_in,                     // shift the input registers (serial mode)
  input  fp32_t par_in   [SIZES[0]],         // parallel stimuli (parallel mode)
  input  logic  en,                          // start a computation
  output fp32_t data_out [SIZES[N_LAYERS]],
  output logic  en_out,
  output fp32_t weight_out
);

  function automatic int unsigned max_size();
    int unsigned m = 0;
    for (int i = 0; i <= int'(N_LAYERS); i++) if (SIZES[i] > m) m = SIZES[i];
    return m;
  endfunction

  localparam int unsigned MAXW = max_size();

  // act[l]: the values entering neuron layer l (act[0] = input registers);
  // only the first SIZES[l] entries of a row are used
  fp32_t act   [N_LAYERS+1][MAXW];
  fp32_t chain [N_LAYERS+1];
  logic  ens   [N_LAYERS+1];

  // ---------------- input layer ----------------
  fp32_t x0 [SIZES[0]];
  input_layer #(.N(SIZES[0]), .SERIAL(SERIAL_INPUT)) u_in (
    .clk, .rst, .load_in, .data_in, .par_in, .en, .x(x0), .en_out(ens[0])
  );
  for (genvar j = 0; j < int'(MAXW); j++) begin : g_act0
    if (j < int'(SIZES[0])) begin : g_used
      assign act[0][j] = x0[j];
    end else begin : g_pad
      assign act[0][j] = '0;
    end
  end

  assign chain[0] = data_in;

  // ---------------- neuron layers ----------------
  for (genvar l = 0; l < int'(N_LAYERS); l++) begin : g_layer
    fp32_t xin  [SIZES[l]];
    fp32_t yout [SIZES[l+1]];
    for (genvar j = 0; j < int'(SIZES[l]); j++) begin : g_in
      assign xin[j] = act[l][j];
    end
    neuron_layer #(
      .N_NEURONS(SIZES[l+1]), .N_IN(SIZES[l]), .ACT(ACTS[l]), .BIAS(BIASES[l])
    ) u_layer (
      .clk, .rst, .load,
      .weight_in(chain[l]), .weight_out(chain[l+1]),
      .en(ens[l]), .x(xin), .en_out(ens[l+1]), .y(yout)
    );
    for (genvar k = 0; k < int'(MAXW); k++) begin : g_out
      if (k < int'(SIZES[l+1])) begin : g_used
        assign act[l+1][k] = yout[k];
      end else begin : g_pad
        assign act[l+1][k] = '0;
      end
    end
  end

  assign weight_out = chain[N_LAYERS];

  // ---------------- output layer ----------------
  fp32_t ylast [SIZES[N_LAYERS]];
  for (genvar k = 0; k < int'(SIZES[N_LAYERS]); k++) begin : g_last
    assign ylast[k] = act[N_LAYERS][k];
  end
  if (OUTPUT_REGS) begin : g_outregs
    output_layer #(.N(SIZES[N_LAYERS])) u_out (
      .clk, .rst, .en(ens[N_LAYERS]), .d(ylast), .q(data_out), .valid(en_out)
    );
  end else begin : g_direct
    // without output registers the last layer drives the outputs directly
    assign data_out = ylast;
    assign en_out   = ens[N_LAYERS];
  end

endmodule
