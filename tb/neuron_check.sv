// neuron_check: test harness for one library neuron configuration.
//
// Resets the neuron, pushes a random weight (and bias) set through its chain, then
// streams NSETS random stimulus sets: back to back for the first half, every other
// cycle for the second half. Each result is checked against a reference (products and
// pairwise sums in the same order as the adder tree, rounded to single precision by
// fp_ref_pkg, then the transfer function) exactly LATENCY cycles after its `en`, and
// `en_out` is checked on every cycle. The weight chain's end is checked after loading.
// Raises `done` when finished; `checks` and `failures` count what it compared.
module neuron_check
  import ann_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter act_e        ACT   = ACT_PURELIN,
  parameter bit          BIAS  = 1'b0,
  parameter int unsigned LAT   = 25,
  parameter int          NSETS = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NREG = N_IN + (BIAS ? 1 : 0);
  localparam int NCYC = NSETS * 3 / 2 + LAT + 4;

  logic  rst, load, en, en_out;
  fp32_t weight_in, weight_out, y;
  fp32_t x [N_IN];

  fp32_t wv [NREG];
  fp32_t xs [NCYC][N_IN];
  fp32_t ye [NCYC];
  logic  ens [NCYC];

  neuron #(.N_IN(N_IN), .ACT(ACT), .BIAS(BIAS)) dut (
    .clk, .rst, .load, .weight_in, .weight_out, .en, .x, .en_out, .y
  );

  function automatic fp32_t act_ref(fp32_t v);
    logic nonneg;
    nonneg = !v[31] || (v[30:0] == '0);
    case (ACT)
      ACT_HARDLIM:  return nonneg ? 32'h3F80_0000 : 32'h0000_0000;
      ACT_HARDLIMS: return nonneg ? 32'h3F80_0000 : 32'hBF80_0000;
      default:      return v;
    endcase
  endfunction

  function automatic fp32_t neuron_ref(int c);
    fp32_t t [N_IN];
    int    n;
    for (int j = 0; j < int'(N_IN); j++) t[j] = ref_mul(xs[c][j], wv[j]);
    n = N_IN;
    while (n > 1) begin
      for (int k = 0; k < n / 2; k++) t[k] = ref_add(t[2*k], t[2*k+1]);
      n = n / 2;
    end
    if (BIAS) t[0] = ref_add(t[0], wv[N_IN]);
    return act_ref(t[0]);
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst = 1'b1; load = 1'b0; en = 1'b0; weight_in = '0;
    for (int j = 0; j < int'(N_IN); j++) x[j] = '0;
    for (int i = 0; i < NREG; i++) wv[i] = rand_fp(120, 130);
    for (int c = 0; c < NCYC; c++) begin
      ens[c] = (c < NSETS / 2) ? 1'b1 : ((c < NSETS * 3 / 2) ? c[0] : 1'b0);
      for (int j = 0; j < int'(N_IN); j++) xs[c][j] = rand_fp(120, 130);
      ye[c] = neuron_ref(c);
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // weights: the word pushed first ends in the last register
    for (int i = NREG - 1; i >= 0; i--) begin
      @(negedge clk);
      load = 1'b1; weight_in = wv[i];
    end
    @(negedge clk);
    load = 1'b0;
    checks++;
    if (weight_out !== wv[NREG-1]) begin
      failures++;
      $display("FAIL N_IN=%0d ACT=%0d: weight_out %h, expected %h", N_IN, ACT, weight_out, wv[NREG-1]);
    end
    for (int c = 0; c < NCYC + LAT; c++) begin
      if (c < NCYC) begin
        en = ens[c];
        x  = xs[c];
      end else begin
        en = 1'b0;
      end
      if (c >= int'(LAT)) begin
        checks++;
        if (en_out !== ens[c-LAT]) begin
          failures++;
          $display("FAIL N_IN=%0d ACT=%0d cycle %0d: en_out %b, expected %b", N_IN, ACT, c, en_out, ens[c-LAT]);
        end else if (en_out) begin
          checks++;
          if (y !== ye[c-LAT]) begin
            failures++;
            if (failures < 8) $display("FAIL N_IN=%0d ACT=%0d set %0d: y %h, expected %h", N_IN, ACT, c-LAT, y, ye[c-LAT]);
          end
        end
      end
      @(negedge clk);
    end
    done = 1'b1;
  end

endmodule
