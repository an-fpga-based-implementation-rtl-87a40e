// frac_delay: variable fractional delay of the channel model.
//
// Delays a sample stream by D = delay / 256 samples, 0 <= D < 16, with an
// integer part Di = delay[11:8] and a fraction f = delay[7:0] / 256. The
// output is the linear interpolation between the input Di and Di+1 samples
// back:
//
//   y[n] = x[n-Di] + f * (x[n-Di-1] - x[n-Di])     (fraction rounded down)
//
// plus one clock for the output register. A tapped delay line of 16
// registers gives the history. The channel model drives it with the
// constant 3.8 samples (delay = 973, 3.80078 samples) to stand for the
// propagation delay. The delay as a second input and the 3.8 constant follow
// the channel model of the design; linear interpolation, the fixed-point
// format and the 15-sample maximum are this design's choices. `en` low
// freezes the delay line and the output. Synchronous active-low reset to zero.
module frac_delay
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pb_sample_t x,
  input  delay_t     delay,
  output pb_sample_t y
);
  localparam int unsigned LEN = 1 << DLY_INT_W;

  pb_sample_t line [LEN];   // line[i] = x delayed by i+1 samples
  pb_sample_t tap  [LEN+1]; // tap[i]  = x delayed by i samples

  logic [DLY_INT_W-1:0]       di;
  logic [DLY_FRAC_W-1:0]      f;
  pb_sample_t                 a, b;
  logic signed [PB_W:0]       diff;
  logic signed [PB_W+DLY_FRAC_W+1:0] prod;
  pb_sample_t                 interp;

  always_comb begin
    tap[0] = x;
    for (int i = 1; i <= LEN; i++) tap[i] = line[i-1];
  end

  assign di   = delay[DLY_W-1:DLY_FRAC_W];
  assign f    = delay[DLY_FRAC_W-1:0];
  assign a    = tap[{1'b0, di}];
  assign b    = tap[{1'b0, di} + 1'b1];
  assign diff = (PB_W+1)'(b) - (PB_W+1)'(a);
  assign prod = diff * $signed({1'b0, f});
  assign interp = pb_sample_t'((PB_W+DLY_FRAC_W+2)'(a) + (prod >>> DLY_FRAC_W));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) line[i] <= '0;
      y <= '0;
    end else if (en) begin
      line[0] <= x;
      for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
      y <= interp;
    end
  end
endmodule
