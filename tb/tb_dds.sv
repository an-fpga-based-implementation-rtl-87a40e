// tb_dds: runs the synthesizer with the 10 MHz carrier increment at a
// 100 MHz clock and checks every output sample against the ideal phase
// ramp theta(t) = (t-2) * inc (t = clock edges after reset), truncated to
// 10 bits and evaluated with floating-point sine and cosine. It then
// measures the carrier frequency by counting zero crossings over 2000
// clocks (expected 400 for 10 MHz), checks that a 90-degree phase offset
// turns the cosine into minus the sine, and that en low freezes the output.
module tb_dds;
  import tb_ref_pkg::*;
  localparam logic [31:0] INC = 32'd429496730;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] phase_inc = INC, phase_off = 0;
  logic signed [7:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  dds dut (.clk, .rst_n, .en, .phase_inc, .phase_off, .sin_o, .cos_o);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ph;
    int idx, crossings;
    logic signed [7:0] prev, hold_s, hold_c;
    real es, ec;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    for (int t = 1; t <= 3000; t++) begin
      @(posedge clk); #1;
      ph = (t >= 2) ? ((longint'(t - 2) * longint'(INC)) & 64'hFFFF_FFFF) : 0;
      idx = int'(ph >> 22);
      es = sin_ref(idx);
      ec = 127.0 * $cos(2.0 * PI * real'(idx) / 1024.0);
      checks += 2;
      if (abs_r(real'(sin_o) - es) > 0.51 || abs_r(real'(cos_o) - ec) > 0.51) begin
        failures++;
        if (failures < 10) $display("t=%0d sin %0d/%f cos %0d/%f", t, sin_o, es, cos_o, ec);
      end
    end
    // frequency: zero crossings of the cosine over 2000 samples
    crossings = 0;
    prev = cos_o;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk); #1;
      if ((prev < 0) != (cos_o < 0)) crossings++;
      prev = cos_o;
    end
    checks++;
    if (crossings < 398 || crossings > 402) begin
      failures++;
      $display("crossings %0d expected 400", crossings);
    end
    // 90 degree offset, with the accumulator frozen:
    // cos(theta + 90) = -sin(theta) and sin(theta + 90) = cos(theta)
    for (int t = 0; t < 40; t++) begin
      logic signed [7:0] s0, c0;
      en = 1;
      repeat ($urandom_range(1, 7)) @(posedge clk);
      #1;
      en = 0; phase_off = 32'h0;
      repeat (2) @(posedge clk);
      #1;
      s0 = sin_o; c0 = cos_o;
      phase_off = 32'h4000_0000;
      repeat (2) @(posedge clk);
      #1;
      checks += 2;
      if (cos_o !== -s0 || sin_o !== c0) begin
        failures++;
        if (failures < 10) $display("offset: sin %0d cos %0d before %0d %0d", sin_o, cos_o, s0, c0);
      end
    end
    phase_off = 32'h0;
    // en low freezes the phase
    en = 0;
    @(posedge clk); #1;
    hold_s = sin_o; hold_c = cos_o;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (sin_o !== hold_s || cos_o !== hold_c) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
