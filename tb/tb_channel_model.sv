// tb_channel_model: passes a 10 MHz tone pair (x_i = A cos, x_q = A sin)
// through the whole channel with the 3.8-sample delay and checks the
// output against a floating-point model: linear interpolation 3.8 samples
// back, three clocks of pipeline, rotation by the phase offset and a gain
// of 127/128. With noise on, y minus the reported noise must still match the
// clean model. Phases: no offset, 180-degree offset, noise.
module tb_channel_model;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] x_i = 0, x_q = 0, y, noise;
  logic [11:0] delay = 12'd973;
  logic [31:0] freq_off = 0, phase_off = 0;
  logic [7:0] noise_gain = 0;
  int checks = 0, failures = 0;

  channel_model dut (.clk, .rst_n, .en, .x_i, .x_q, .delay, .freq_off, .phase_off,
                     .noise_gain, .y, .noise);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real A = 8000.0;
  real noisy_samples = 0.0;

  initial begin
    int t;
    real f, phi, e, a0, a1, d;
    f = real'(973 & 255) / 256.0;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    t = 0;
    for (int seg = 0; seg < 3; seg++) begin
      phase_off  = (seg == 1) ? 32'h8000_0000 : 32'h0;
      phi        = (seg == 1) ? PI : 0.0;
      noise_gain = (seg == 2) ? 8'd40 : 8'd0;
      for (int c = 0; c < 300; c++) begin
        real arg;
        arg = 2.0 * PI * real'(t) / 10.0;
        x_i = 16'($rtoi($floor(A * $cos(arg) + 0.5)));
        x_q = 16'($rtoi($floor(A * $sin(arg) + 0.5)));
        @(posedge clk); #1;
        t++;
        if (c > 30) begin
          // input presented before edge t-1 is sample t-1; the delay stage
          // output uses samples t-1-3-... : total lag 3 + 3.8 samples
          a0 = A * $cos(2.0 * PI * real'(t - 1 - 2 - 3) / 10.0 + phi);
          a1 = A * $cos(2.0 * PI * real'(t - 1 - 2 - 4) / 10.0 + phi);
          e  = 127.0 / 128.0 * ((1.0 - f) * a0 + f * a1);
          d  = abs_r(real'(y) - real'(noise) - e);
          checks++;
          if (d > 0.012 * A + 3.0) begin
            failures++;
            if (failures < 10) $display("seg %0d t=%0d y=%0d noise=%0d expected %f", seg, t, y, noise, e);
          end
          if (seg == 2 && noise != 0) noisy_samples += 1.0;
        end
      end
    end
    checks++;
    if (noisy_samples < 100.0) failures++;   // noise really was added
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
