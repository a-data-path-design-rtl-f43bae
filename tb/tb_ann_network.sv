// tb_ann_network: end-to-end testbench of the layered network.
//
// Four networks are driven by net_check harnesses:
//   h_ser  the default 4-4-2 PureLin network, serial stimulus input (52-cycle latency)
//   h_par  the same network with parallel input, sets back to back (52 cycles)
//   h_deep a 4-2-2-2 network: biased 4-input PureLin neurons, 2-input HardLims
//          neurons, biased 2-input PureLin neurons, parallel input
//          (1 + 33 + 17 + 25 + 1 = 77 cycles)
//   h_dir  the default network, parallel input, without output registers (51 cycles)
// Every result is checked for value and exact latency. Each mechanism must happen at
// least once or it counts as a failure: weight-chain load and reload, serial shifts,
// parallel captures, back-to-back results, bias additions, both outcomes of the hard
// limit, and results taken without output registers.
module tb_ann_network;
  import ann_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  localparam layer_sizes_t DEEP_SIZES = '{4, 2, 2, 2, 0, 0, 0, 0, 0};
  localparam layer_acts_t  DEEP_ACTS  = '{ACT_PURELIN, ACT_HARDLIMS, ACT_PURELIN, ACT_PURELIN,
                                          ACT_PURELIN, ACT_PURELIN, ACT_PURELIN, ACT_PURELIN};
  localparam layer_bias_t  DEEP_BIAS  = '{1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
  logic done [NH];
  int ck [NH], fl [NH], wl [NH], sh [NH], pc [NH], bb [NH], rr [NH], bi [NH], hh [NH], hl [NH];

  net_check #(.SERIAL_INPUT(1'b1), .LAT(52), .NSETS(12)) h_ser (
    .clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_wload(wl[0]), .n_shift(sh[0]),
    .n_pcap(pc[0]), .n_b2b(bb[0]), .n_reload_res(rr[0]), .n_bias(bi[0]), .n_hl_hi(hh[0]), .n_hl_lo(hl[0]));

  net_check #(.SERIAL_INPUT(1'b0), .LAT(52), .NSETS(40)) h_par (
    .clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_wload(wl[1]), .n_shift(sh[1]),
    .n_pcap(pc[1]), .n_b2b(bb[1]), .n_reload_res(rr[1]), .n_bias(bi[1]), .n_hl_hi(hh[1]), .n_hl_lo(hl[1]));

  net_check #(.SERIAL_INPUT(1'b0), .N_LAYERS(3), .SIZES(DEEP_SIZES),
              .ACTS(DEEP_ACTS), .BIASES(DEEP_BIAS),
              .LAT(77), .NSETS(40)) h_deep (
    .clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_wload(wl[2]), .n_shift(sh[2]),
    .n_pcap(pc[2]), .n_b2b(bb[2]), .n_reload_res(rr[2]), .n_bias(bi[2]), .n_hl_hi(hh[2]), .n_hl_lo(hl[2]));

  net_check #(.SERIAL_INPUT(1'b0), .OUTPUT_REGS(1'b0), .LAT(51), .NSETS(20)) h_dir (
    .clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .n_wload(wl[3]), .n_shift(sh[3]),
    .n_pcap(pc[3]), .n_b2b(bb[3]), .n_reload_res(rr[3]), .n_bias(bi[3]), .n_hl_hi(hh[3]), .n_hl_lo(hl[3]));

  int checks, failures;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int s_wl, s_sh, s_pc, s_bb, s_rr, s_bi, s_hh, s_hl;
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NH; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0; failures = 0;
    s_wl = 0; s_sh = 0; s_pc = 0; s_bb = 0; s_rr = 0; s_bi = 0; s_hh = 0; s_hl = 0;
    for (int i = 0; i < NH; i++) begin
      checks += ck[i]; failures += fl[i];
      s_wl += wl[i]; s_sh += sh[i]; s_pc += pc[i]; s_bb += bb[i];
      s_rr += rr[i]; s_bi += bi[i]; s_hh += hh[i]; s_hl += hl[i];
    end
    $display("mechanisms: chain loads %0d, serial shifts %0d, parallel captures %0d, back-to-back results %0d",
             s_wl, s_sh, s_pc, s_bb);
    $display("            results after reload %0d, bias additions %0d, hard limit +1 %0d, -1 %0d",
             s_rr, s_bi, s_hh, s_hl);
    checks += 9;
    if (rr[3] == 0) begin failures++; $display("FAIL no results from the network without output registers"); end
    if (s_wl < 2 * NH) begin failures++; $display("FAIL weight reload missing"); end
    if (s_sh == 0) begin failures++; $display("FAIL no serial shift"); end
    if (s_pc == 0) begin failures++; $display("FAIL no parallel capture"); end
    if (s_bb == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (s_rr == 0) begin failures++; $display("FAIL no results after reload"); end
    if (s_bi == 0) begin failures++; $display("FAIL no bias addition"); end
    if (s_hh == 0) begin failures++; $display("FAIL hard limit never high"); end
    if (s_hl == 0) begin failures++; $display("FAIL hard limit never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
