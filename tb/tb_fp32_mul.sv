// tb_fp32_mul: self-checking testbench for the pipelined single-precision multiplier.
//
// A new operand pair is applied on every cycle (full throughput). Each product is
// compared, exactly LATENCY cycles after its operands were applied, with a reference
// computed in double precision and rounded to single (fp_ref_pkg). Random operands
// are followed by directed cases: zeros, infinities, NaN, overflow, underflow flush and
// a rounding carry into the exponent.
module tb_fp32_mul;
  import ann_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT = MUL_LAT;
  localparam int NRAND = 2000;
  localparam int NDIR = 10;
  localparam int N = NRAND + NDIR;

  logic  clk;
  initial clk = 1'b0;
  fp32_t a, b, p;
  int    checks = 0, failures = 0;

  fp32_t va [N];
  fp32_t vb [N];
  fp32_t ve [N];

  fp32_mul dut (.clk(clk), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NRAND; i++) begin
      va[i] = rand_fp(80, 170);
      vb[i] = rand_fp(80, 170);
      ve[i] = ref_mul(va[i], vb[i]);
    end
    // directed cases with expected values worked out by hand
    va[NRAND+0] = 32'h3FC0_0000; vb[NRAND+0] = 32'h4000_0000; ve[NRAND+0] = 32'h4040_0000; // 1.5*2 = 3
    va[NRAND+1] = 32'h0000_0000; vb[NRAND+1] = 32'hC120_0000; ve[NRAND+1] = 32'h8000_0000; // 0*-10 = -0
    va[NRAND+2] = 32'h7F80_0000; vb[NRAND+2] = 32'h3F80_0000; ve[NRAND+2] = 32'h7F80_0000; // inf*1
    va[NRAND+3] = 32'h7F80_0000; vb[NRAND+3] = 32'h0000_0000; ve[NRAND+3] = FP_QNAN;       // inf*0
    va[NRAND+4] = 32'h7FC0_0001; vb[NRAND+4] = 32'h3F80_0000; ve[NRAND+4] = FP_QNAN;       // NaN*1
    va[NRAND+5] = 32'h7F00_0000; vb[NRAND+5] = 32'h4000_0000; ve[NRAND+5] = 32'h7F80_0000; // 2^127*2 overflows
    va[NRAND+6] = 32'h0080_0000; vb[NRAND+6] = 32'h3F00_0000; ve[NRAND+6] = 32'h0000_0000; // 2^-126*0.5 flushed
    va[NRAND+7] = 32'h3FFF_FFFF; vb[NRAND+7] = 32'h3FFF_FFFF; ve[NRAND+7] = 32'h407F_FFFE; // (2-2^-23)^2
    va[NRAND+8] = 32'h3F80_0001; vb[NRAND+8] = 32'h3F7F_FFFF; ve[NRAND+8] = 32'h3F80_0000; // rounds to 1.0
    va[NRAND+9] = 32'hBF80_0000; vb[NRAND+9] = 32'h4049_0FDB; ve[NRAND+9] = 32'hC049_0FDB; // -1*pi
    a = '0; b = '0;
    for (int j = 0; j < N + LAT; j++) begin
      @(negedge clk);
      if (j < N) begin a = va[j]; b = vb[j]; end
      if (j >= LAT) begin
        checks++;
        if (p !== ve[j-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: %h * %h = %h, expected %h", j-LAT, va[j-LAT], vb[j-LAT], p, ve[j-LAT]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
