// tb_weight_chain: self-checking testbench for the serially loaded weight registers.
//
// Checks reset to zero, that N pushes place the first word in the last register,
// that registers hold while `load` is low (including a gap in the middle of loading),
// and that `weight_out` follows the last register so chains can be joined.
module tb_weight_chain;
  import ann_pkg::*;

  localparam int N = 5;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, load;
  fp32_t weight_in, weight_out;
  fp32_t w [N];
  fp32_t model [N];
  int    checks = 0, failures = 0;

  weight_chain #(.N(N)) dut (.clk, .rst, .load, .weight_in, .w, .weight_out);

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (w[i] !== model[i]) begin
        failures++;
        $display("FAIL %s: w[%0d]=%h expected %h", what, i, w[i], model[i]);
      end
    end
    checks++;
    if (weight_out !== model[N-1]) begin
      failures++;
      $display("FAIL %s: weight_out=%h expected %h", what, weight_out, model[N-1]);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; weight_in = 32'h1234_5678;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    compare("reset");
    rst = 1'b0;
    for (int k = 0; k < 40; k++) begin
      load = ($urandom_range(3) != 0);
      weight_in = $urandom;
      @(negedge clk);
      if (load) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = weight_in;
      end
      compare("shift");
    end
    // a full load of N distinct words: the first one ends in the last register
    for (int i = 0; i < N; i++) begin
      load = 1'b1; weight_in = 32'h4000_0000 + i;
      @(negedge clk);
    end
    load = 1'b0;
    for (int i = 0; i < N; i++) model[i] = 32'h4000_0000 + (N - 1 - i);
    repeat (3) @(negedge clk);
    compare("full load and hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
