// sample_counter: the 4-bit oversampling counter of the baseband stage.
//
// It counts the 100 MHz sample clock modulo 16 while `en` is high. Its value
// forms the four least significant bits of the pulse-shaping ROM address, so
// each data bit is followed by 16 filter outputs. `sym_tick` is high in the
// cycle where the count is 15 (and `en` is high); it marks the last sample of
// a symbol and is used as the 6.25 MHz symbol-rate enable for the data
// counter and the shift register. Counting modulo 16 at 100 MHz and the
// 16x ratio between the two rates follow the transmitter's description; using
// the terminal count as a clock enable instead of a second clock is this
// design's choice. Synchronous active-low reset to zero.
module sample_counter #(
  parameter int unsigned W = tx_pkg::OSF_LOG2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] cnt,
  output logic         sym_tick
);
  always_ff @(posedge clk) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= cnt + 1'b1;
  end

  assign sym_tick = en && (cnt == {W{1'b1}});
endmodule
