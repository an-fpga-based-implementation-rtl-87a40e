// baseband_modulator: NRZ line coding and raised-cosine pulse shaping.
//
// The stored bit stream is read at the symbol rate (the 100 MHz sample
// clock divided by 16 = 6.25 MHz) and shaped into 16 samples per bit:
//   - data_addr_counter walks the input memory, one address per symbol;
//   - input_data_mem returns the bit one clock after the read;
//   - shift_reg5 keeps the last five bits (q[0] newest);
//   - sample_counter counts the 16 samples of each symbol; its terminal
//     count is the symbol-rate enable for the three blocks above;
//   - the concatenation of the shift register (MSBs) and the sample count
//     (LSBs) addresses rc_filter_rom, whose word is the shaped, bipolar
//     sample (NRZ mapping is built into the table).
// Timing: when `en` first rises, the first 32 samples come from the reset
// history (all zeros, i.e. -1 symbols); memory bit d[m] is the newest bit of
// the shift register during symbol m+2, and `bb` lags the ROM address by one
// clock. Counting the clock edges at which `en` is high from 0, `bb` holds
// sample n right after edge n; with m = n/16 and k = n%16, the shift
// register then holds d[m-2-j] at bit j (d[<0] = 0). `sym_tick` marks the last
// sample clock of every symbol, `wrap` the symbol where the address counter
// returns to zero. The structure is the one described for the design; the
// clock-enable scheme and the memory interface are this design's choices.
module baseband_modulator
  import tx_pkg::*;
#(
  parameter int unsigned AW = 14   // input memory depth 2**AW bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  // loading port of the input memory
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic          mem_wdata,
  // shaped baseband, one sample per clock while en is high
  output bb_sample_t    bb,
  output logic          sym_tick,
  output logic          wrap,
  output logic [AW-1:0] rd_addr
);
  logic [OSF_LOG2-1:0] k;
  logic                bit_q;
  logic [WINDOW-1:0]   hist;
  logic [ROM_AW-1:0]   rom_addr;

  sample_counter u_smp (
    .clk, .rst_n, .en,
    .cnt      (k),
    .sym_tick (sym_tick)
  );

  data_addr_counter #(.AW(AW)) u_addr (
    .clk, .rst_n,
    .en   (sym_tick),
    .addr (rd_addr),
    .wrap (wrap)
  );

  input_data_mem #(.AW(AW)) u_mem (
    .clk, .rst_n,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .re    (sym_tick),
    .raddr (rd_addr),
    .rdata (bit_q)
  );

  shift_reg5 u_sr (
    .clk, .rst_n,
    .en  (sym_tick),
    .din (bit_q),
    .q   (hist)
  );

  // concatenation block: 5 history bits above the 4-bit sample phase
  assign rom_addr = {hist, k};

  rc_filter_rom u_rom (
    .clk,
    .addr (rom_addr),
    .data (bb)
  );
endmodule
