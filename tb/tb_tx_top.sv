// tb_tx_top: end-to-end test of the transmitter at its default size.
//
// Loads all 16384 bits of the input memory with random data, then sends
// the whole stream once and wraps around (16 samples per bit at 100 MHz).
// Every clock it checks, against floating-point models computed here:
//   - the shaped baseband: raised-cosine filter output for the bit history;
//   - the BPSK wave: previous baseband sample times the 10 MHz carrier
//     127*cos(2*pi*theta/1024), theta the 10-bit truncated phase ramp;
//   - the channel output: 127/128 times the wave delayed by 3 + 3.8
//     samples (linear interpolation), first with no offset, then with a
//     180-degree phase offset; with noise, the output minus the reported
//     noise.
// In the last third it turns on a 100 kHz frequency offset and noise, and
// checks that the carrier phase really rotates (the sign of the output
// against the unrotated model changes) and that noise is added. Each
// mechanism (symbol steps, bit transitions, address wrap, fractional delay,
// phase offset, frequency offset, noise) is counted and must occur.
module tb_tx_top;
  import tb_ref_pkg::*;
  localparam int AW = 14;
  localparam int NB = 1 << AW;
  localparam logic [31:0] INC = 32'd429496730;
  localparam real F = 205.0 / 256.0;      // fraction of the 3.8 sample delay

  logic clk = 0, rst_n = 0, en = 0;
  logic mem_we = 0, mem_wdata = 0;
  logic [AW-1:0] mem_waddr = 0, data_addr;
  logic [31:0] ch_freq_off = 0, ch_phase_off = 0;
  logic [7:0] ch_noise_gain = 0;
  logic signed [7:0] bb;
  logic signed [15:0] pb, ch, ch_noise;
  logic sym_tick, wrap;

  int checks = 0, failures = 0;
  logic bits [NB];
  int pb_h [int];
  int bb_h [int];

  tx_top dut (.clk, .rst_n, .en, .mem_we, .mem_waddr, .mem_wdata,
              .ch_freq_off, .ch_phase_off, .ch_noise_gain,
              .bb, .pb, .ch, .ch_noise, .sym_tick, .wrap, .data_addr);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_at(int m);
    if (m < 0) return 1'b0;
    return bits[m % NB];
  endfunction

  function automatic int car_ref(int t);
    longint unsigned ph;
    ph = (t >= 2) ? ((longint'(t - 2) * longint'(INC)) & 64'hFFFF_FFFF) : 0;
    return $rtoi($floor(127.0 * $cos(2.0 * PI * real'(ph >> 22) / 1024.0) + 0.5));
  endfunction

  task automatic fail(string what, int t, int got, real e);
    failures++;
    if (failures < 15) $display("%s t=%0d got %0d expected %f", what, t, got, e);
  endtask

  initial begin
    int t, n, e0, nsamp, seg_len;
    int n_sym = 0, n_wrap = 0, n_trans = 0, n_delay = 0, n_phase = 0;
    int n_freq_flip = 0, n_noise = 0, n_fo_samples = 0;
    logic [4:0] h;
    real e, eb, ec;
    int pbe;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    t = 0;
    // load the memory with random bits
    for (int i = 0; i < NB; i++) begin
      bits[i] = 1'($urandom);
      mem_we = 1; mem_waddr = AW'(i); mem_wdata = bits[i];
      @(posedge clk); #1; t++;
      pb_h[t] = int'(pb); bb_h[t] = int'(bb);
    end
    mem_we = 0;
    for (int i = 1; i < NB; i++) if (bits[i] != bits[i-1]) n_trans++;

    en = 1;
    nsamp   = NB * 16 + 64 * 16;     // the whole stream and 64 more bits
    seg_len = nsamp / 3;
    e0 = t + 1;                        // first edge at which en is high
    for (n = 0; n < nsamp; n++) begin
      if (n == seg_len) ch_phase_off = 32'h8000_0000;
      if (n == 2 * seg_len) begin
        ch_phase_off  = 32'h0;
        ch_freq_off   = 32'd4294967;   // 100 kHz at 100 MHz
        ch_noise_gain = 8'd32;
      end
      @(posedge clk); #1; t++;
      pb_h[t] = int'(pb); bb_h[t] = int'(bb);

      // baseband
      for (int j = 0; j < 5; j++) h[j] = bit_at(n / 16 - 2 - j);
      eb = shaped(h, n % 16);
      checks++;
      if (abs_r(real'(bb) - eb) > 0.51) fail("bb", t, int'(bb), eb);
      if (sym_tick) n_sym++;
      if (wrap) n_wrap++;

      // BPSK wave: previous baseband times the carrier of the previous clock
      if (n > 2) begin
        pbe = bb_h[t-1] * car_ref(t - 1);
        checks++;
        if (int'(pb) != pbe) fail("pb", t, int'(pb), real'(pbe));
      end

      // channel: 127/128 * interpolation of pb(t-6), pb(t-7)
      if (n > 20) begin
        ec = 127.0 / 128.0 * ((1.0 - F) * real'(pb_h[t-6]) + F * real'(pb_h[t-7]));
        if (n < seg_len) begin
          checks++;
          if (abs_r(real'(ch) - ec) > 3.0) fail("ch", t, int'(ch), ec);
          else n_delay++;
        end else if (n >= seg_len + 10 && n < 2 * seg_len) begin
          checks++;
          if (abs_r(real'(ch) + ec) > 3.0) fail("ch180", t, int'(ch), -ec);
          else n_phase++;
        end else if (n >= 2 * seg_len + 10) begin
          int clean;
          clean = int'(ch) - int'(ch_noise);
          checks++;
          if (clean > 12000 || clean < -12000) fail("ch_fo", t, clean, 0.0);
          if (ch_noise != 0) n_noise++;
          if (abs_r(ec) > 3000.0) begin
            n_fo_samples++;
            if ((real'(clean) * ec) < 0.0) n_freq_flip++;
          end
        end
      end
    end
    $display("symbols %0d wraps %0d transitions %0d delay-checked %0d phase-checked %0d",
             n_sym, n_wrap, n_trans, n_delay, n_phase);
    $display("freq-offset flips %0d of %0d, noisy samples %0d", n_freq_flip, n_fo_samples, n_noise);
    checks++; if (n_sym != nsamp / 16)      begin failures++; $display("symbol count"); end
    checks++; if (n_wrap < 1)               begin failures++; $display("no wrap"); end
    checks++; if (n_trans < 1)              begin failures++; $display("no transition"); end
    checks++; if (n_delay < 1000)           begin failures++; $display("delay not seen"); end
    checks++; if (n_phase < 1000)           begin failures++; $display("phase offset not seen"); end
    checks++; if (n_freq_flip < n_fo_samples / 4) begin failures++; $display("freq offset not seen"); end
    checks++; if (n_noise < 1000)           begin failures++; $display("noise not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
