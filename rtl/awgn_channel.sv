// awgn_channel: additive white Gaussian noise of the channel model.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) yields a
// new 32-bit word every clock. Its four bytes are added and their mean of
// 510 removed, which by the central limit theorem gives a roughly Gaussian
// value in [-510, 510] with standard deviation 147.8. That value is scaled by
// noise_gain / 4 (0 turns the noise off; 255 gives sigma = 9420, against a
// largest clean sample near 11700) and added to x with saturation:
//
//   noise = ((b0 + b1 + b2 + b3 - 510) * noise_gain) >>> 2
//   y     = sat16(x + noise)
//
// `noise` is brought out for observation. Both outputs are registered (one
// clock). That the channel adds white Gaussian noise follows the channel
// model of the design; the generator, its seed and the gain scaling are
// this design's choices. Synchronous active-low reset loads the seed.
module awgn_channel
  import tx_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pb_sample_t x,
  input  logic [7:0] noise_gain,
  output pb_sample_t y,
  output pb_sample_t noise
);
  logic [31:0]              rng_q, r1, r2, r3;
  logic signed [10:0]       uni_sum;   // -510 .. 510
  logic signed [19:0]       scaled;
  logic signed [PB_W+9:0]   total;

  // one xorshift32 step
  assign r1 = rng_q ^ (rng_q << 13);
  assign r2 = r1 ^ (r1 >> 17);
  assign r3 = r2 ^ (r2 << 5);

  assign uni_sum = 11'sd0 + $signed({3'b0, rng_q[7:0]})  + $signed({3'b0, rng_q[15:8]})
                          + $signed({3'b0, rng_q[23:16]}) + $signed({3'b0, rng_q[31:24]})
                          - 11'sd510;
  assign scaled  = (20'(uni_sum) * $signed({1'b0, noise_gain})) >>> 2;
  assign total   = (PB_W+10)'(x) + (PB_W+10)'(scaled);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rng_q <= SEED;
      y     <= '0;
      noise <= '0;
    end else if (en) begin
      rng_q <= r3;
      y     <= sat_pb(total);
      noise <= pb_sample_t'(scaled);
    end
  end
endmodule
