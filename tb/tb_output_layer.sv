// tb_output_layer: self-checking testbench for the result registers.
//
// Random results arrive with random enables; `q` must take `d` only when `en` was high
// and hold otherwise, and `valid` must be `en` delayed by one cycle.
module tb_output_layer;
  import ann_pkg::*;

  localparam int N = 2;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, en, valid;
  fp32_t d [N], q [N], m [N];
  int    checks = 0, failures = 0;

  output_layer #(.N(N)) dut (.clk, .rst, .en, .d, .q, .valid);

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int i = 0; i < N; i++) begin d[i] = $urandom; m[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 60; k++) begin
      en = ($urandom_range(2) == 0);
      for (int i = 0; i < N; i++) d[i] = $urandom;
      @(negedge clk);
      if (en) m = d;
      checks++;
      if (valid !== en) begin failures++; $display("FAIL valid k=%0d", k); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== m[i]) begin failures++; $display("FAIL q[%0d]=%h expected %h", i, q[i], m[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
