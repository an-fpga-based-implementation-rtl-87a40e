// tx_top: FPGA BPSK transmitter with a channel impairment model.
//
// Data path, all on one 100 MHz clock:
//   input memory -> NRZ + raised-cosine pulse shaping (baseband_modulator,
//   16 samples per bit, 6.25 Mbit/s) -> BPSK multiplier with a 10 MHz DDS
//   cosine carrier (dds, bpsk_modulator) -> channel_model (3.8-sample delay,
//   phase/frequency offset, AWGN).
// Outputs: the shaped baseband `bb`, the modulated wave `pb` (what a DAC
// would convert) and the impaired wave `ch`. The 50 MHz board clock and the
// clock manager that derives 100 MHz from it are outside this module: `clk`
// is the 100 MHz clock, and the 6.25 MHz symbol rate is a clock enable made
// inside. The carrier runs whenever the design is out of reset; `en` starts
// and pauses the bit stream and the channel model. The input memory is
// loaded through the `mem_*` port; `data_addr` is the address of the next
// bit to be read.
// Latency: bb as in baseband_modulator; pb = bb one clock later times the
// carrier; ch = pb after delay + 3 clocks.
module tx_top
  import tx_pkg::*;
#(
  parameter int unsigned AW          = 14,
  parameter phase_t      CARRIER_INC = CARRIER_INC_10MHZ,
  parameter delay_t      CH_DELAY    = CH_DELAY_3P8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic          mem_wdata,
  input  phase_t        ch_freq_off,
  input  phase_t        ch_phase_off,
  input  logic [7:0]    ch_noise_gain,
  output bb_sample_t    bb,
  output pb_sample_t    pb,
  output pb_sample_t    ch,
  output pb_sample_t    ch_noise,
  output logic          sym_tick,
  output logic          wrap,
  output logic [AW-1:0] data_addr
);
  car_sample_t     car_sin, car_cos;
  pb_sample_t      pb_q;

  baseband_modulator #(.AW(AW)) u_bb (
    .clk, .rst_n, .en,
    .mem_we, .mem_waddr, .mem_wdata,
    .bb, .sym_tick, .wrap, .rd_addr(data_addr)
  );

  dds u_carrier (
    .clk, .rst_n,
    .en        (1'b1),
    .phase_inc (CARRIER_INC),
    .phase_off ('0),
    .sin_o     (car_sin),
    .cos_o     (car_cos)
  );

  bpsk_modulator u_mod (
    .clk, .rst_n,
    .bb      (bb),
    .car_cos (car_cos),
    .car_sin (car_sin),
    .pb_i    (pb),
    .pb_q    (pb_q)
  );

  channel_model u_ch (
    .clk, .rst_n, .en,
    .x_i        (pb),
    .x_q        (pb_q),
    .delay      (CH_DELAY),
    .freq_off   (ch_freq_off),
    .phase_off  (ch_phase_off),
    .noise_gain (ch_noise_gain),
    .y          (ch),
    .noise      (ch_noise)
  );
endmodule
