// sincos_lut: sine/cosine lookup table of the direct digital synthesizer.
//
// One 1024-entry table of round(127 * sin(2*pi*i/1024)) (rtl/sine_lut.hex)
// is read at two addresses: the quantized phase for the sine and the phase
// plus a quarter turn (256) for the cosine, the "phase argument of 90
// degrees" way of getting the cosine from a sine table. Both outputs are
// registered (one clock of latency), as in a dual-port block RAM. Table depth
// 2**LUT_AW and sample width follow the DDS structure of the design; the
// values 1024 and 8 bits are this design's choice.
module sincos_lut
  import tx_pkg::*;
(
  input  logic              clk,
  input  logic [LUT_AW-1:0] phase,
  output car_sample_t       sin_o,
  output car_sample_t       cos_o
);
  localparam logic [LUT_AW-1:0] QUARTER = LUT_AW'(1 << (LUT_AW - 2));

  logic [CAR_W-1:0] lut [2**LUT_AW];

  initial $readmemh("rtl/sine_lut.hex", lut);

  always_ff @(posedge clk) begin
    sin_o <= car_sample_t'(lut[phase]);
    cos_o <= car_sample_t'(lut[phase + QUARTER]);
  end
endmodule
