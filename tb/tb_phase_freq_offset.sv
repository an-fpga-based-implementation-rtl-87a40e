// tb_phase_freq_offset: feeds a 10 MHz passband tone (x_i = A cos, x_q = A sin,
// as from the modulator with a constant baseband A) and checks:
//   - with no offset, y = 127/128 * A cos(w t) one clock later;
//   - with phase offsets of 90, 180 and 270 degrees, y follows
//     127/128 * A cos(w t + phi), computed in floating point;
//   - with a frequency offset and a constant input (x_i = A, x_q = 0), the
//     number of zero crossings of y over 4000 clocks matches the offset;
//   - a large input saturates instead of wrapping.
module tb_phase_freq_offset;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] x_i = 0, x_q = 0, y;
  logic [31:0] freq_off = 0, phase_off = 0;
  int checks = 0, failures = 0;

  phase_freq_offset dut (.clk, .rst_n, .en, .x_i, .x_q, .freq_off, .phase_off, .y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real A = 10000.0;

  task automatic tone_check(input logic [31:0] poff, input real phi);
    real e;
    phase_off = poff;
    for (int n = 0; n < 200; n++) begin
      real arg;
      arg = 2.0 * PI * real'(n) / 10.0;
      x_i = 16'($rtoi($floor(A * $cos(arg) + 0.5)));
      x_q = 16'($rtoi($floor(A * $sin(arg) + 0.5)));
      @(posedge clk); #1;
      if (n > 5) begin
        e = 127.0 / 128.0 * A * $cos(arg + phi);
        checks++;
        // 8-bit rotation factors: error below 1% of A
        if (abs_r(real'(y) - e) > 0.01 * A + 2.0) begin
          failures++;
          if (failures < 10) $display("phi=%f n=%0d y=%0d expected %f", phi, n, y, e);
        end
      end
    end
  endtask

  initial begin
    int crossings;
    logic signed [15:0] prev;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    tone_check(32'h0000_0000, 0.0);
    tone_check(32'h4000_0000, PI / 2.0);
    tone_check(32'h8000_0000, PI);
    tone_check(32'hC000_0000, 3.0 * PI / 2.0);
    // frequency offset of 1/200 of the sample rate -> 40 crossings in 4000
    phase_off = 0;
    freq_off  = 32'd21474836;
    x_i = 16'sd10000; x_q = 0;
    repeat (10) @(posedge clk);
    #1;
    prev = y; crossings = 0;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #1;
      if ((prev < 0) != (y < 0)) crossings++;
      prev = y;
    end
    checks++;
    if (crossings < 39 || crossings > 41) begin
      failures++;
      $display("crossings %0d expected 40", crossings);
    end
    // saturation: x_i = x_q = -32768 at phi = 45 degrees gives -1.41 full scale
    freq_off = 0; phase_off = 32'h2000_0000;
    x_i = -16'sd32768; x_q = 16'sd32767;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (y !== -16'sd32768) begin
      failures++;
      $display("saturation: y=%0d", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
