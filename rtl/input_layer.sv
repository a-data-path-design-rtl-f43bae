// input_layer: the stimulus registers in front of the first neuron layer.
//
// N registers hold one stimulus set x[0..N-1]. Two ways of filling them, chosen by
// SERIAL:
//   SERIAL = 1  the registers form a shift chain on the shared data/weight input:
//               each cycle `load_in` is high, x[0] takes `data_in` and x[i] takes
//               x[i-1], so N cycles fill the set (the word shifted in first lands in
//               x[N-1]). This saves input pins.
//   SERIAL = 0  all registers take `par_in` in the cycle `en` is high, so a new set can
//               enter every cycle, for the highest stimulus rate.
// Raising `en` starts a computation: `en_out` is `en` delayed by one cycle, when `x`
// holds the set, and drives the first neuron layer's enable. `rst` (synchronous,
// active high) clears the registers and `en_out`.
// The two ways of connecting the registers follow the network description; the
// separate `load_in` strobe and the one-cycle `en` to `en_out` timing are this
// design's choices.
module input_layer
  import ann_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter bit          SERIAL = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load_in,
  input  fp32_t data_in,
  input  fp32_t par_in [N],
  input  logic  en,
  output fp32_t x [N],
  output logic  en_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) x[i] <= '0;
      en_out <= 1'b0;
    end else begin
      en_out <= en;
      if (SERIAL) begin
        if (load_in) begin
          x[0] <= data_in;
          for (int i = 1; i < int'(N); i++) x[i] <= x[i-1];
        end
      end else if (en) begin
        x <= par_in;
      end
    end
  end

endmodule
