// tb_input_layer: self-checking testbench for the stimulus registers.
//
// A serial instance is filled word by word through `data_in`/`load_in` (first word
// ends in x[N-1]) and must hold while `load_in` is low; a parallel instance takes a
// new `par_in` set on every cycle `en` is high. For both, `en_out` must be `en`
// delayed by one cycle.
module tb_input_layer;
  import ann_pkg::*;

  localparam int N = 4;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, load_in, en;
  fp32_t data_in;
  fp32_t par_in [N];
  fp32_t xs [N], xp [N];
  logic  es, ep;
  fp32_t ms [N], mp [N];
  int    checks = 0, failures = 0;

  input_layer #(.N(N), .SERIAL(1'b1)) u_ser (.clk, .rst, .load_in, .data_in, .par_in, .en, .x(xs), .en_out(es));
  input_layer #(.N(N), .SERIAL(1'b0)) u_par (.clk, .rst, .load_in, .data_in, .par_in, .en, .x(xp), .en_out(ep));

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1'b1; load_in = 1'b0; en = 1'b0; data_in = '0;
    for (int i = 0; i < N; i++) begin par_in[i] = '0; ms[i] = '0; mp[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 60; k++) begin
      load_in = 1'($urandom_range(1));
      en      = 1'($urandom_range(1));
      data_in = $urandom;
      for (int i = 0; i < N; i++) par_in[i] = $urandom;
      @(negedge clk);
      if (load_in) begin
        for (int i = N - 1; i > 0; i--) ms[i] = ms[i-1];
        ms[0] = data_in;
      end
      if (en) mp = par_in;
      checks += 2;
      if (es !== en) begin failures++; $display("FAIL serial en_out k=%0d", k); end
      if (ep !== en) begin failures++; $display("FAIL parallel en_out k=%0d", k); end
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (xs[i] !== ms[i]) begin failures++; $display("FAIL serial x[%0d]=%h expected %h", i, xs[i], ms[i]); end
        if (xp[i] !== mp[i]) begin failures++; $display("FAIL parallel x[%0d]=%h expected %h", i, xp[i], mp[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
