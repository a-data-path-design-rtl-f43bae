// tb_neuron: self-checking testbench for the library neuron.
//
// Runs one neuron_check harness per library entry: 2- and 4-input neurons with the
// PureLin, HardLim and HardLims transfer functions, plus a biased 2-input and a
// biased 4-input PureLin neuron. Latencies checked: 17 cycles (2 inputs), 25 cycles
// (4 inputs), 8 more with a bias.
module tb_neuron;
  import ann_pkg::*;

  localparam int NH = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NH];
  int   ck   [NH];
  int   fl   [NH];

  neuron_check #(.N_IN(4), .ACT(ACT_PURELIN),  .BIAS(1'b0), .LAT(25)) h0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  neuron_check #(.N_IN(2), .ACT(ACT_PURELIN),  .BIAS(1'b0), .LAT(17)) h1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  neuron_check #(.N_IN(4), .ACT(ACT_HARDLIM),  .BIAS(1'b0), .LAT(25)) h2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  neuron_check #(.N_IN(2), .ACT(ACT_HARDLIM),  .BIAS(1'b0), .LAT(17)) h3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  neuron_check #(.N_IN(4), .ACT(ACT_HARDLIMS), .BIAS(1'b0), .LAT(25)) h4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]));
  neuron_check #(.N_IN(2), .ACT(ACT_HARDLIMS), .BIAS(1'b0), .LAT(17)) h5 (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]));
  neuron_check #(.N_IN(2), .ACT(ACT_PURELIN),  .BIAS(1'b1), .LAT(25)) h6 (.clk, .done(done[6]), .checks(ck[6]), .failures(fl[6]));
  neuron_check #(.N_IN(4), .ACT(ACT_PURELIN),  .BIAS(1'b1), .LAT(33)) h7 (.clk, .done(done[7]), .checks(ck[7]), .failures(fl[7]));

  int checks, failures;

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NH; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += ck[i];
      failures += fl[i];
      if (ck[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
