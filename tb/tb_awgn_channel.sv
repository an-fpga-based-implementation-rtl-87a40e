// tb_awgn_channel: checks that
//   - with noise_gain 0 the output equals the input one clock later;
//   - with noise, y = sat16(x + noise) exactly, one clock later;
//   - the noise has mean near 0 and standard deviation near
//     147.8 * gain / 4 (the sum of four uniform bytes), with about 67% of
//     samples in_1sd one sigma, as for a near-Gaussian distribution;
//   - successive noise samples are nearly uncorrelated (white);
//   - a large input saturates instead of wrapping.
module tb_awgn_channel;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] x = 0, y, noise;
  logic [7:0] noise_gain = 0;
  int checks = 0, failures = 0;

  awgn_channel dut (.clk, .rst_n, .en, .x, .noise_gain, .y, .noise);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xin, e;
    real sum, sum2, mean, sd, expect_sd, corr, prevn;
    int in_1sd, n, clips;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    for (int c = 0; c < 200; c++) begin
      x = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (y !== x) failures++;
    end
    noise_gain = 8'd128;
    expect_sd = 147.8 * 128.0 / 4.0;
    sum = 0; sum2 = 0; in_1sd = 0; corr = 0; prevn = 0; clips = 0;
    n = 20000;
    for (int c = 0; c < n; c++) begin
      x = 16'($signed(16'($urandom_range(0, 40000))) - 16'sd20000);
      if (c % 1000 == 0) x = 16'sd32000;
      xin = int'(x);
      @(posedge clk); #1;
      e = xin + int'(noise);
      if (e > 32767) begin e = 32767; clips++; end
      if (e < -32768) begin e = -32768; clips++; end
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("x=%0d noise=%0d y=%0d", xin, noise, y);
      end
      sum  += real'(noise);
      sum2 += real'(noise) * real'(noise);
      corr += real'(noise) * prevn;
      prevn = real'(noise);
      if (noise < 16'(int'(expect_sd)) && noise > -16'(int'(expect_sd))) in_1sd++;
    end
    mean = sum / n;
    sd   = $sqrt(sum2 / n - mean * mean);
    corr = corr / n / (sd * sd);
    $display("noise mean %f sd %f (expected %f) within1sd %0d/%0d lag1 corr %f clips %0d",
             mean, sd, expect_sd, in_1sd, n, corr, clips);
    checks++;
    if (mean > 0.03 * expect_sd || mean < -0.03 * expect_sd) failures++;
    checks++;
    if (sd < 0.95 * expect_sd || sd > 1.05 * expect_sd) failures++;
    checks++;
    if (in_1sd < int'(0.62 * n) || in_1sd > int'(0.72 * n)) failures++;
    checks++;
    if (corr > 0.05 || corr < -0.05) failures++;
    checks++;
    if (clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
