// phase_freq_offset: carrier phase and frequency offset of the channel model.
//
// Rotates the passband signal by a slowly turning angle
// phi[n] = phase_off + n * freq_off (both in units of 2*pi / 2**32 per
// sample), so the received carrier is shifted in phase and frequency:
//
//   y = x_i * cos(phi) - x_q * sin(phi)
//
// x_i is the modulated wave s*cos(wt) and x_q its quadrature twin s*sin(wt);
// the identity s*cos(wt+phi) = x_i*cos(phi) - x_q*sin(phi) makes the rotation
// exact for a real passband signal. cos(phi) and sin(phi) come from a
// second DDS instance (amplitude 127); the sum is divided by 128, so a zero
// offset gives y = 127/128 * x_i. The output is saturated to 16 bits and
// registered (one clock), plus the DDS latency for a change of the offsets.
// The block's place and purpose follow the channel model of the design; how
// it works, through the quadrature signal and a DDS, is this design's choice.
// Synchronous active-low reset.
module phase_freq_offset
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pb_sample_t x_i,
  input  pb_sample_t x_q,
  input  phase_t     freq_off,
  input  phase_t     phase_off,
  output pb_sample_t y
);
  car_sample_t rot_sin, rot_cos;
  logic signed [PB_W+CAR_W-1:0] p_i, p_q;
  logic signed [PB_W+CAR_W:0]   acc;

  dds u_rot (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .phase_inc (freq_off),
    .phase_off (phase_off),
    .sin_o     (rot_sin),
    .cos_o     (rot_cos)
  );

  assign p_i = x_i * rot_cos;
  assign p_q = x_q * rot_sin;
  assign acc = (PB_W+CAR_W+1)'(p_i) - (PB_W+CAR_W+1)'(p_q);

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= sat_pb((PB_W+10)'(acc >>> 7));
  end
endmodule
