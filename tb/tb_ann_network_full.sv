// tb_ann_network_full: the concrete-strength network at its default configuration.
//
// The network is instantiated exactly as built (serial stimulus input, 4-4-2 PureLin
// layers). The 24 weights are pushed through the chain, then 68 stimulus sets, one per
// concrete mix (cement, water, consistency, temperature, scaled to about 1..10), are
// shifted in and evaluated one after another, as a host reading the mixes from a table
// would do. Each pair of predicted strengths is checked against a single-precision
// reference network and must appear 52 cycles after its start. The stimulus values are
// generated, since no trained weights or measured mixes come with the design.
module tb_ann_network_full;
  import ann_pkg::*;
  import fp_ref_pkg::*;

  localparam int NI = 4, NH = 4, NO = 2;
  localparam int NW = 24;
  localparam int LAT = 52;
  localparam int NMIX = 68;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, load, load_in, en, en_out;
  fp32_t data_in, weight_out;
  fp32_t par_in [NI];
  fp32_t data_out [NO];
  fp32_t wchain [NW];
  int    checks = 0, failures = 0;

  ann_network dut (
    .clk, .rst, .data_in, .load, .load_in, .par_in, .en,
    .data_out, .en_out, .weight_out);

  function automatic fp32_t dot4(fp32_t a [NI], int base);
    return ref_add(ref_add(ref_mul(a[0], wchain[base]),   ref_mul(a[1], wchain[base+1])),
                   ref_add(ref_mul(a[2], wchain[base+2]), ref_mul(a[3], wchain[base+3])));
  endfunction

  initial begin
    repeat (NMIX * (NI + 1 + LAT + 2) + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    fp32_t x [NI];
    fp32_t h [NH];
    fp32_t y [NO];
    int    wait_cycles;
    rst = 1'b1; load = 1'b0; load_in = 1'b0; en = 1'b0; data_in = '0;
    for (int j = 0; j < NI; j++) par_in[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NW; p++) wchain[p] = rand_fp(121, 127);   // |w| in [2^-6, 2)
    for (int s = 0; s < NW; s++) begin
      load = 1'b1; data_in = wchain[NW-1-s];
      @(negedge clk);
    end
    load = 1'b0;
    checks++;
    if (weight_out !== wchain[NW-1]) begin failures++; $display("FAIL weight chain end"); end
    for (int n = 0; n < NMIX; n++) begin
      for (int j = 0; j < NI; j++) x[j] = {1'b0, 8'(127 + $urandom_range(3)), 23'($urandom)};
      for (int k = 0; k < NH; k++) h[k] = dot4(x, 4 * k);
      for (int m = 0; m < NO; m++) y[m] = dot4(h, 16 + 4 * m);
      for (int j = NI - 1; j >= 0; j--) begin
        load_in = 1'b1; data_in = x[j];
        @(negedge clk);
      end
      load_in = 1'b0;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      wait_cycles = 1;
      while (!en_out && wait_cycles < 2 * LAT) begin
        @(negedge clk);
        wait_cycles++;
      end
      checks++;
      if (wait_cycles != LAT) begin failures++; $display("FAIL mix %0d: result after %0d cycles, expected %0d", n, wait_cycles, LAT); end
      for (int m = 0; m < NO; m++) begin
        checks++;
        if (data_out[m] !== y[m]) begin
          failures++; $display("FAIL mix %0d output %0d: %h expected %h", n, m, data_out[m], y[m]);
        end
      end
    end
    $display("evaluated %0d mixes", NMIX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
