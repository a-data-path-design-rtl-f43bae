// tb_activation_unit: self-checking testbench for the three transfer functions.
//
// One instance per function is fed the same values, including +0, -0 and values of
// both signs; each output is compared one cycle later with the expected constant
// (or the input for PureLin), and `en_out` must be `en` delayed by one cycle.
module tb_activation_unit;
  import ann_pkg::*;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, en;
  fp32_t v;
  logic  eo [3];
  fp32_t y  [3];
  int    checks = 0, failures = 0;

  activation_unit #(.ACT(ACT_PURELIN))  u_pl (.clk, .rst, .en, .v, .en_out(eo[0]), .y(y[0]));
  activation_unit #(.ACT(ACT_HARDLIM))  u_hl (.clk, .rst, .en, .v, .en_out(eo[1]), .y(y[1]));
  activation_unit #(.ACT(ACT_HARDLIMS)) u_hs (.clk, .rst, .en, .v, .en_out(eo[2]), .y(y[2]));

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    fp32_t vals [8];
    logic  nonneg;
    vals = '{32'h0000_0000, 32'h8000_0000, 32'h3F80_0000, 32'hBF80_0000,
             32'h4B00_0001, 32'hCB00_0001, 32'h0080_0000, 32'h8080_0000};
    rst = 1'b1; en = 1'b0; v = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (eo[0] || eo[1] || eo[2]) begin failures++; $display("FAIL en_out after reset"); end
    rst = 1'b0;
    for (int k = 0; k < 40; k++) begin
      en = k[0] | k[2];
      v  = (k < 8) ? vals[k] : {$urandom};
      @(negedge clk);
      nonneg = !v[31] || (v[30:0] == '0);
      checks += 4;
      if (eo[0] !== en || eo[1] !== en || eo[2] !== en) begin failures++; $display("FAIL en_out k=%0d", k); end
      if (y[0] !== v) begin failures++; $display("FAIL purelin %h -> %h", v, y[0]); end
      if (y[1] !== (nonneg ? 32'h3F80_0000 : 32'h0000_0000)) begin failures++; $display("FAIL hardlim %h -> %h", v, y[1]); end
      if (y[2] !== (nonneg ? 32'h3F80_0000 : 32'hBF80_0000)) begin failures++; $display("FAIL hardlims %h -> %h", v, y[2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
