// tb_fp32_add: self-checking testbench for the pipelined single-precision adder.
//
// A new operand pair is applied on every cycle (full throughput). Each sum is
// compared, exactly LATENCY cycles after its operands were applied, with a reference
// computed in double precision and rounded to single (fp_ref_pkg). Random operands
// (including cancellation between nearly equal magnitudes) are followed by directed
// cases: signed zeros, infinities, NaN, overflow, underflow flush and ties to even.
module tb_fp32_add;
  import ann_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT = ADD_LAT;
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

  fp32_add dut (.clk(clk), .a(a), .b(b), .s(p));

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
      va[i] = rand_fp(110, 135);
      vb[i] = rand_fp(110, 135);
      ve[i] = ref_add(va[i], vb[i]);
    end
    // directed cases with expected values worked out by hand
    va[NRAND+0] = 32'h3FC0_0000; vb[NRAND+0] = 32'h4000_0000; ve[NRAND+0] = 32'h4060_0000; // 1.5+2 = 3.5
    va[NRAND+1] = 32'h4120_0000; vb[NRAND+1] = 32'hC120_0000; ve[NRAND+1] = 32'h0000_0000; // 10-10 = +0
    va[NRAND+2] = 32'h8000_0000; vb[NRAND+2] = 32'h8000_0000; ve[NRAND+2] = 32'h8000_0000; // -0 + -0 = -0
    va[NRAND+3] = 32'h7F80_0000; vb[NRAND+3] = 32'hFF80_0000; ve[NRAND+3] = FP_QNAN;       // inf-inf
    va[NRAND+4] = 32'hFF80_0000; vb[NRAND+4] = 32'h3F80_0000; ve[NRAND+4] = 32'hFF80_0000; // -inf+1
    va[NRAND+5] = 32'h7F7F_FFFF; vb[NRAND+5] = 32'h7F7F_FFFF; ve[NRAND+5] = 32'h7F80_0000; // max+max overflows
    va[NRAND+6] = 32'h0100_0000; vb[NRAND+6] = 32'h80FF_FFFF; ve[NRAND+6] = 32'h0000_0000; // tiny difference flushed
    va[NRAND+7] = 32'h3F80_0000; vb[NRAND+7] = 32'h3380_0000; ve[NRAND+7] = 32'h3F80_0000; // 1+2^-24 ties to even
    va[NRAND+8] = 32'h3F80_0001; vb[NRAND+8] = 32'h3380_0000; ve[NRAND+8] = 32'h3F80_0002; // tie rounds up to even
    va[NRAND+9] = 32'h3F80_0000; vb[NRAND+9] = 32'hB380_0000; ve[NRAND+9] = 32'h3F7F_FFFF; // 1-2^-24 exact
    a = '0; b = '0;
    for (int j = 0; j < N + LAT; j++) begin
      @(negedge clk);
      if (j < N) begin a = va[j]; b = vb[j]; end
      if (j >= LAT) begin
        checks++;
        if (p !== ve[j-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: %h + %h = %h, expected %h", j-LAT, va[j-LAT], vb[j-LAT], p, ve[j-LAT]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
