// dds: direct digital synthesizer (numerically controlled oscillator).
//
// Structure: the phase increment (delta theta) is registered, a phase
// accumulator adds it every clock, the phase theta(n) (plus `phase_off`) is
// quantized by truncation to its LUT_AW top bits, and the sine/cosine table
// turns it into samples. Output frequency: f_out = phase_inc * f_clk / 2**32;
// for the 10 MHz carrier at 100 MHz, phase_inc = 429496730.
//
// Timing: a new `phase_inc` is registered one clock after it is presented,
// reaches the accumulator the clock after that, and the table adds one more
// clock. With en held high, sin_o/cos_o at clock t reflect the accumulator
// value at clock t-1. `en` low freezes the accumulator. Synchronous
// active-low reset clears the increment register and the accumulator.
//
// The increment register, accumulator, quantizer and table follow the DDS
// block diagram of the design; the widths and the `phase_off` input (used by
// the channel model to add a phase offset) are this design's choices.
module dds
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  phase_t      phase_inc,
  input  phase_t      phase_off,
  output car_sample_t sin_o,
  output car_sample_t cos_o
);
  phase_t            inc_q;   // registered phase increment
  phase_t            acc_q;   // phase accumulator
  phase_t            theta;
  logic [LUT_AW-1:0] theta_q; // quantized phase

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inc_q <= '0;
      acc_q <= '0;
    end else if (en) begin
      inc_q <= phase_inc;
      acc_q <= acc_q + inc_q;
    end
  end

  assign theta   = acc_q + phase_off;
  assign theta_q = LUT_AW'(theta >> (PHASE_W - LUT_AW));

  sincos_lut u_lut (
    .clk   (clk),
    .phase (theta_q),
    .sin_o (sin_o),
    .cos_o (cos_o)
  );
endmodule
