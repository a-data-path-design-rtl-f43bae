// neuron: one library neuron, y = f(sum_j w_j * x_j [+ bias]) in single precision.
//
// Four sections, left to right:
//   Register Unit        a weight_chain holding w_0..w_{N_IN-1} and, when BIAS is set,
//                        the bias after them; loaded serially through weight_in/weight_out
//   Multiplication Unit  N_IN parallel fp32_mul, x_j * w_j
//   Addition Unit        a balanced tree of fp32_add (log2 N_IN levels), then one more
//                        fp32_add for the bias when BIAS is set
//   Activation Unit      activation_unit, 1 cycle
// All arithmetic is pipelined, so a new stimulus set may be applied every cycle. Drive
// the stimuli on `x` and raise `en` (the library's EnN) in the same cycle; LATENCY
// cycles later `en_out` (EnN_Out) is high for one cycle and `y` (FonkOut) holds the
// result. LATENCY = 8 + 8*log2(N_IN) + 1, i.e. 17 for two inputs and 25 for four, plus
// 8 with a bias. Weights are used as they stand when a stimulus set enters the
// multipliers (and the bias when the sum reaches the bias adder), so `load` must not
// shift the chain while a set is in flight if the old weights are wanted; an assertion
// forbids raising `load` and `en` in the same cycle.
// The four sections, the chain, the latencies and the port set follow the library
// description. Placing the bias last in the chain and adding it after the tree are this
// design's choices; N_IN must be a power of two (the library has 2 and 4).
module neuron
  import ann_pkg::*;
#(
  parameter int unsigned N_IN = 4,
  parameter act_e        ACT  = ACT_PURELIN,
  parameter bit          BIAS = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  // Register Unit chain
  input  logic  load,
  input  fp32_t weight_in,
  output fp32_t weight_out,
  // stimuli and result
  input  logic  en,
  input  fp32_t x [N_IN],
  output logic  en_out,
  output fp32_t y
);

  localparam int unsigned LEVELS  = $clog2(N_IN);
  localparam int unsigned NREG    = N_IN + (BIAS ? 1 : 0);
  localparam int unsigned SUM_LAT = MUL_LAT + LEVELS * ADD_LAT + (BIAS ? ADD_LAT : 0);

  initial assert (N_IN >= 2 && (1 << LEVELS) == N_IN)
    else $error("neuron: N_IN must be a power of two, at least 2");

  // ---------------- Register Unit ----------------
  fp32_t w [NREG];
  weight_chain #(.N(NREG)) u_regs (
    .clk, .rst, .load, .weight_in, .w, .weight_out
  );

  // ---------------- Multiplication and Addition Units ----------------
  // tree[l][k]: k-th partial sum of level l; level 0 holds the products
  fp32_t tree [LEVELS+1][N_IN];

  for (genvar j = 0; j < int'(N_IN); j++) begin : g_mul
    fp32_mul u_mul (.clk, .a(x[j]), .b(w[j]), .p(tree[0][j]));
  end

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    for (genvar k = 0; k < int'(N_IN >> (l + 1)); k++) begin : g_add
      fp32_add u_add (.clk, .a(tree[l][2*k]), .b(tree[l][2*k+1]), .s(tree[l+1][k]));
    end
    // slots a level does not use are tied off
    for (genvar k = int'(N_IN >> (l + 1)); k < int'(N_IN); k++) begin : g_unused
      assign tree[l+1][k] = '0;
    end
  end

  fp32_t sum;
  if (BIAS) begin : g_bias
    fp32_add u_bias (.clk, .a(tree[LEVELS][0]), .b(w[N_IN]), .s(sum));
  end else begin : g_nobias
    assign sum = tree[LEVELS][0];
  end

  // ---------------- enable pipeline ----------------
  logic [SUM_LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[SUM_LAT-2:0], en};
  end

  // ---------------- Activation Unit ----------------
  activation_unit #(.ACT(ACT)) u_act (
    .clk, .rst, .en(vld[SUM_LAT-1]), .v(sum), .en_out, .y
  );

  // a stimulus set and a weight shift in the same cycle are not allowed
  assert property (@(posedge clk) disable iff (rst) !(en && load))
    else $error("neuron: en and load high in the same cycle");

endmodule
