// bpsk_modulator: passband BPSK modulator (multiplier).
//
// Multiplies the shaped bipolar baseband by the DDS carrier. Because the
// baseband of a 1 bit is positive and that of a 0 bit negative, the product
// is the carrier with its phase flipped by 180 degrees between the two bits
// (a 1 at phase 0; inverting the data gives the opposite labelling).
// pb_i = bb * cos is the modulated wave. pb_q = bb * sin is the same signal
// on the quadrature carrier; it is not transmitted, and only the channel
// model uses it, to rotate the carrier phase. Both products are full 16-bit
// signed results, registered once (one clock of latency). The
// multiplier-with-DDS-carrier structure follows the design; the quadrature
// product and the register are this design's choices. Synchronous
// active-low reset to zero.
module bpsk_modulator
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bb_sample_t  bb,
  input  car_sample_t car_cos,
  input  car_sample_t car_sin,
  output pb_sample_t  pb_i,
  output pb_sample_t  pb_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pb_i <= '0;
      pb_q <= '0;
    end else begin
      pb_i <= bb * car_cos;
      pb_q <= bb * car_sin;
    end
  end
endmodule
