// rc_filter_rom: ROM-based raised-cosine pulse-shaping filter (with NRZ mapping).
//
// Instead of multiplying and adding, the filter stores its output for every
// possible input. The address is {bits[4:0], k[3:0]}: `bits` is the 5-bit
// data history from the shift register (bits[0] newest) and `k` the sample
// phase within the current symbol (16 samples per symbol). Each data bit is
// NRZ-mapped (1 -> +1, 0 -> -1) inside the table, so the unipolar address
// yields a bipolar, shaped output:
//
//   ROM[{b,k}] = round(64 * sum_{j=0..4} (2*b[j]-1) * h[16*j + k])
//   h[n] = rc((n-32)/16) for n = 0..64, else 0
//   rc(t) = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2),  beta = 0.5
//
// h has 65 taps (order 65 in the usual counting) and a group delay of 32
// samples, i.e. two symbols; the output is an 8-bit signed value with 1.0 = 64.
// The 512 x 8 organisation, the 5 + 4 address split, 65 taps and group delay
// of 32 follow the transmitter's description; the roll-off 0.5, the tap
// alignment and the scaling are this design's choices. The table is held in
// rtl/rc_filter_rom.hex. Read is synchronous, like a block RAM: `data` shows
// the word at `addr` one clock later.
module rc_filter_rom
  import tx_pkg::*;
(
  input  logic              clk,
  input  logic [ROM_AW-1:0] addr,
  output bb_sample_t        data
);
  logic [BB_W-1:0] rom [ROM_DEPTH];

  initial $readmemh("rtl/rc_filter_rom.hex", rom);

  always_ff @(posedge clk) data <= bb_sample_t'(rom[addr]);
endmodule
