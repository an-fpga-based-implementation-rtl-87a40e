// channel_model: channel impairments applied to the transmitted wave.
//
// Three stages in a row, as in a simple model of a practical link:
//   1. frac_delay        - propagation delay of `delay`/256 samples (the
//                          transmitter uses 3.8 samples), applied to the
//                          wave and to its quadrature twin alike;
//   2. phase_freq_offset - carrier phase offset `phase_off` and frequency
//                          offset `freq_off` (2*pi/2**32 units per sample);
//   3. awgn_channel      - additive Gaussian noise scaled by `noise_gain`.
// The order of the stages and the 3.8-sample delay follow the channel model
// of the design; the controls and number formats are this design's choices.
// Latency for the wave: delay + 1 (delay stage) + 1 (rotation) + 1 (noise).
module channel_model
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pb_sample_t x_i,
  input  pb_sample_t x_q,
  input  delay_t     delay,
  input  phase_t     freq_off,
  input  phase_t     phase_off,
  input  logic [7:0] noise_gain,
  output pb_sample_t y,
  output pb_sample_t noise
);
  pb_sample_t d_i, d_q, rot;

  frac_delay u_dly_i (.clk, .rst_n, .en, .x(x_i), .delay, .y(d_i));
  frac_delay u_dly_q (.clk, .rst_n, .en, .x(x_q), .delay, .y(d_q));

  phase_freq_offset u_off (
    .clk, .rst_n, .en,
    .x_i       (d_i),
    .x_q       (d_q),
    .freq_off  (freq_off),
    .phase_off (phase_off),
    .y         (rot)
  );

  awgn_channel u_awgn (
    .clk, .rst_n, .en,
    .x          (rot),
    .noise_gain (noise_gain),
    .y          (y),
    .noise      (noise)
  );
endmodule
