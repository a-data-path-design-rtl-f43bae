// ann_pkg: types and constants shared by the floating-point neural-network datapath.
//
// The network works on IEEE-754 single-precision (32-bit) words throughout. Every
// multiplier and adder is pipelined with an 8-cycle latency and the transfer function
// has a 1-cycle latency, which gives a 4-input neuron its 25-cycle latency and a 2-input
// neuron its 17 cycles. The activation encoding, and the HardLims (symmetric hard limit,
// -1/+1) variant, are this design's own choices; PureLin and HardLim follow the usual
// definitions v and (v >= 0 ? 1 : 0).
package ann_pkg;

  localparam int unsigned FP_W    = 32;  // single-precision word
  localparam int unsigned MUL_LAT = 8;   // floating-point multiplier latency, cycles
  localparam int unsigned ADD_LAT = 8;   // floating-point adder latency, cycles
  localparam int unsigned ACT_LAT = 1;   // transfer-function latency, cycles
  localparam int unsigned MAX_LAYERS = 8; // neuron layers an ann_network can describe

  typedef logic [FP_W-1:0] fp32_t;

  // IEEE-754 single-precision field view
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_fields_t;

  localparam fp32_t FP_ZERO     = 32'h0000_0000;
  localparam fp32_t FP_ONE      = 32'h3F80_0000;
  localparam fp32_t FP_MINUS1   = 32'hBF80_0000;
  localparam fp32_t FP_QNAN     = 32'h7FC0_0000;

  // Transfer functions of the neuron library
  typedef enum logic [1:0] {
    ACT_PURELIN  = 2'd0,  // f(v) = v
    ACT_HARDLIM  = 2'd1,  // f(v) = 1 if v >= 0, else 0
    ACT_HARDLIMS = 2'd2   // f(v) = 1 if v >= 0, else -1
  } act_e;

  // Per-layer description of an ann_network (entries past N_LAYERS are ignored)
  typedef int unsigned layer_sizes_t [MAX_LAYERS+1];
  typedef act_e        layer_acts_t  [MAX_LAYERS];
  typedef bit          layer_bias_t  [MAX_LAYERS];

  // Latency of a library neuron from EnN to EnN_Out
  function automatic int unsigned neuron_latency(int unsigned n_in, bit bias);
    return MUL_LAT + $clog2(n_in) * ADD_LAT + (bias ? ADD_LAT : 0) + ACT_LAT;
  endfunction

endpackage
