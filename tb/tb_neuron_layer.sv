// tb_neuron_layer: self-checking testbench for a fully connected layer of neurons.
//
// A layer of three 4-input PureLin neurons and a layer of two 2-input HardLim neurons
// are each loaded through their single weight chain (the first word pushed ends in the
// last weight of the last neuron) and fed random stimulus sets back to back. Every
// neuron's output is compared with a reference built in the adder-tree order, and
// `en_out` must follow `en` by exactly the neuron latency (25 and 17 cycles).
module tb_neuron_layer;
  import ann_pkg::*;
  import fp_ref_pkg::*;

  localparam int NA = 3, IA = 4, LA = 25;
  localparam int NB = 2, IB = 2, LB = 17;
  localparam int NSETS = 40;
  localparam int NCYC = NSETS + LA + 2;

  logic  clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, load, en, eoa, eob;
  fp32_t weight_in, woa, wob;
  fp32_t xa [IA], xb [IB];
  fp32_t ya [NA], yb [NB];
  fp32_t wa [NA][IA], wb [NB][IB];
  fp32_t sa [NCYC][IA], sb [NCYC][IB];
  int    checks = 0, failures = 0;

  neuron_layer #(.N_NEURONS(NA), .N_IN(IA), .ACT(ACT_PURELIN)) u_a (
    .clk, .rst, .load, .weight_in, .weight_out(woa), .en, .x(xa), .en_out(eoa), .y(ya));
  neuron_layer #(.N_NEURONS(NB), .N_IN(IB), .ACT(ACT_HARDLIM)) u_b (
    .clk, .rst, .load, .weight_in, .weight_out(wob), .en, .x(xb), .en_out(eob), .y(yb));

  function automatic fp32_t ref_a(int c, int k);
    return ref_add(ref_add(ref_mul(sa[c][0], wa[k][0]), ref_mul(sa[c][1], wa[k][1])),
                   ref_add(ref_mul(sa[c][2], wa[k][2]), ref_mul(sa[c][3], wa[k][3])));
  endfunction

  function automatic fp32_t ref_b(int c, int k);
    fp32_t v;
    v = ref_add(ref_mul(sb[c][0], wb[k][0]), ref_mul(sb[c][1], wb[k][1]));
    return (!v[31] || v[30:0] == '0) ? 32'h3F80_0000 : 32'h0000_0000;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < NA; k++) for (int j = 0; j < IA; j++) wa[k][j] = rand_fp(120, 130);
    for (int k = 0; k < NB; k++) for (int j = 0; j < IB; j++) wb[k][j] = rand_fp(120, 130);
    for (int c = 0; c < NCYC; c++) begin
      for (int j = 0; j < IA; j++) sa[c][j] = rand_fp(120, 130);
      for (int j = 0; j < IB; j++) sb[c][j] = rand_fp(120, 130);
    end
    rst = 1'b1; load = 1'b0; en = 1'b0; weight_in = '0;
    xa = sa[0]; xb = sb[0];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // push layer A's words, last neuron's last weight first (layer B is loaded with
    // the tail of the same stream: its chain is shorter)
    for (int p = NA * IA - 1; p >= 0; p--) begin
      load = 1'b1;
      weight_in = (p < NB * IB) ? wb[p / IB][p % IB] : wa[p / IA][p % IA];
      if (p < NB * IB) wa[p / IA][p % IA] = weight_in;
      @(negedge clk);
    end
    load = 1'b0;
    checks += 2;
    if (woa !== wa[NA-1][IA-1]) begin failures++; $display("FAIL layer A weight_out"); end
    if (wob !== wb[NB-1][IB-1]) begin failures++; $display("FAIL layer B weight_out"); end
    for (int c = 0; c < NCYC; c++) begin
      en = (c < NSETS);
      xa = sa[c]; xb = sb[c];
      @(negedge clk);
      // after this edge: result of set c+1-L is visible
      if (c + 1 >= LA) begin
        checks++;
        if (eoa !== (c + 1 - LA < NSETS)) begin failures++; $display("FAIL A en_out cycle %0d", c); end
        else if (eoa) for (int k = 0; k < NA; k++) begin
          checks++;
          if (ya[k] !== ref_a(c + 1 - LA, k)) begin
            failures++; $display("FAIL A neuron %0d set %0d: %h vs %h", k, c + 1 - LA, ya[k], ref_a(c + 1 - LA, k));
          end
        end
      end
      if (c + 1 >= LB) begin
        checks++;
        if (eob !== (c + 1 - LB < NSETS)) begin failures++; $display("FAIL B en_out cycle %0d", c); end
        else if (eob) for (int k = 0; k < NB; k++) begin
          checks++;
          if (yb[k] !== ref_b(c + 1 - LB, k)) begin
            failures++; $display("FAIL B neuron %0d set %0d: %h vs %h", k, c + 1 - LB, yb[k], ref_b(c + 1 - LB, k));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
