// net_check: test harness that drives one ann_network end to end.
//
// Pushes a random weight set through the chain, runs NSETS stimulus sets, drains the
// pipeline, then pushes a second weight set and repeats. Serial networks get each set
// shifted in word by word (last input first) and then started; parallel networks get
// the first half of the sets back to back, one per cycle, and the rest with random
// gaps. Every result is compared with a reference network computed in single
// precision in the datapath's order (products, pairwise adder tree, bias, transfer
// function), and must appear exactly LAT cycles after its `en`. It counts how often
// each mechanism happened: chain loads, serial shifts, parallel captures, back-to-back
// results, results with reloaded weights, bias additions, and the two outcomes of the
// hard limits.
module net_check
  import ann_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter bit          SERIAL_INPUT         = 1'b1,
  parameter bit          OUTPUT_REGS          = 1'b1,
  parameter int unsigned N_LAYERS             = 2,
  parameter layer_sizes_t SIZES          = '{4, 4, 2, 0, 0, 0, 0, 0, 0},
  parameter layer_acts_t  ACTS           = '{ACT_PURELIN, ACT_PURELIN, ACT_PURELIN, ACT_PURELIN,
                                            ACT_PURELIN, ACT_PURELIN, ACT_PURELIN, ACT_PURELIN},
  parameter layer_bias_t  BIASES         = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0},
  parameter int          LAT                  = 52,
  parameter int          NSETS                = 30
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_wload,
  output int   n_shift,
  output int   n_pcap,
  output int   n_b2b,
  output int   n_reload_res,
  output int   n_bias,
  output int   n_hl_hi,
  output int   n_hl_lo
);

  localparam int NI = SIZES[0];
  localparam int NO = SIZES[N_LAYERS];
  localparam int MAXW = 8;

  function automatic int chain_len();
    int n = 0;
    for (int l = 0; l < int'(N_LAYERS); l++) n += SIZES[l+1] * (SIZES[l] + BIASES[l]);
    return n;
  endfunction
  localparam int NW = chain_len();

  logic  rst, load, load_in, en, en_out;
  fp32_t data_in, weight_out;
  fp32_t par_in [NI];
  fp32_t data_out [NO];

  ann_network #(.SERIAL_INPUT(SERIAL_INPUT), .OUTPUT_REGS(OUTPUT_REGS), .N_LAYERS(N_LAYERS), .SIZES(SIZES),
                .ACTS(ACTS), .BIASES(BIASES)) dut (
    .clk, .rst, .data_in, .load, .load_in, .par_in, .en,
    .data_out, .en_out, .weight_out);

  fp32_t wchain [NW];

  typedef struct {
    int    due;
    fp32_t y [NO];
  } expect_t;
  expect_t q [$];
  expect_t e;

  int  cycle;
  bit  reloaded, prev_eo;

  function automatic fp32_t act_ref(act_e a, fp32_t v);
    logic nonneg;
    nonneg = !v[31] || (v[30:0] == '0);
    case (a)
      ACT_HARDLIM:  return nonneg ? 32'h3F80_0000 : 32'h0000_0000;
      ACT_HARDLIMS: return nonneg ? 32'h3F80_0000 : 32'hBF80_0000;
      default:      return v;
    endcase
  endfunction

  function automatic expect_t net_ref(fp32_t x [NI], int due);
    expect_t r;
    fp32_t   cur [MAXW], nxt [MAXW], t [MAXW];
    int      pos, n;
    for (int j = 0; j < NI; j++) cur[j] = x[j];
    pos = 0;
    for (int l = 0; l < int'(N_LAYERS); l++) begin
      for (int k = 0; k < int'(SIZES[l+1]); k++) begin
        for (int j = 0; j < int'(SIZES[l]); j++) t[j] = ref_mul(cur[j], wchain[pos + j]);
        n = SIZES[l];
        while (n > 1) begin
          for (int i = 0; i < n / 2; i++) t[i] = ref_add(t[2*i], t[2*i+1]);
          n = n / 2;
        end
        pos += SIZES[l];
        if (BIASES[l]) begin
          t[0] = ref_add(t[0], wchain[pos]);
          pos++;
          n_bias++;
        end
        nxt[k] = act_ref(ACTS[l], t[0]);
        if (ACTS[l] != ACT_PURELIN) begin
          if (nxt[k] == 32'h3F80_0000) n_hl_hi++;
          else n_hl_lo++;
        end
      end
      cur = nxt;
    end
    for (int m = 0; m < NO; m++) r.y[m] = cur[m];
    r.due = due;
    return r;
  endfunction

  initial cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // result checker, sampled between edges
  initial begin
    prev_eo = 1'b0;
    forever begin
      @(negedge clk);
      if (!rst && en_out) begin
        checks++;
        if (prev_eo) n_b2b++;
        if (q.size() == 0) begin
          failures++; $display("FAIL %m: unexpected result at cycle %0d", cycle);
        end else begin
          e = q.pop_front();
          if (e.due != cycle) begin
            failures++; $display("FAIL %m: result at cycle %0d, due %0d", cycle, e.due);
          end
          for (int m = 0; m < NO; m++) if (data_out[m] !== e.y[m]) begin
            failures++; $display("FAIL %m out %0d: %h expected %h", m, data_out[m], e.y[m]);
          end
          if (reloaded) n_reload_res++;
        end
      end
      prev_eo = !rst && en_out;
    end
  end

  task automatic load_weights();
    for (int p = 0; p < NW; p++) wchain[p] = rand_fp(122, 129);
    for (int s = 0; s < NW; s++) begin
      load = 1'b1; data_in = wchain[NW-1-s];
      @(negedge clk);
    end
    load = 1'b0;
    n_wload++;
    checks++;
    if (weight_out !== wchain[NW-1]) begin
      failures++; $display("FAIL %m: chain end %h expected %h", weight_out, wchain[NW-1]);
    end
  endtask

  task automatic run_sets();
    fp32_t x [NI];
    for (int n = 0; n < NSETS; n++) begin
      for (int j = 0; j < NI; j++) x[j] = rand_fp(122, 129);
      if (SERIAL_INPUT) begin
        for (int j = NI - 1; j >= 0; j--) begin
          load_in = 1'b1; data_in = x[j];
          @(negedge clk);
          n_shift++;
        end
        load_in = 1'b0;
      end else begin
        par_in = x;
        n_pcap++;
      end
      en = 1'b1;
      q.push_back(net_ref(x, cycle + LAT));
      @(negedge clk);
      en = 1'b0;
      if (!SERIAL_INPUT && n >= NSETS / 2) repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    n_wload = 0; n_shift = 0; n_pcap = 0; n_b2b = 0; n_reload_res = 0;
    n_bias = 0; n_hl_hi = 0; n_hl_lo = 0;
    reloaded = 1'b0;
    rst = 1'b1; load = 1'b0; load_in = 1'b0; en = 1'b0; data_in = '0;
    for (int j = 0; j < NI; j++) par_in[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      load_weights();
      reloaded = (pass == 1);
      run_sets();
      while (q.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    done = 1'b1;
  end

endmodule
