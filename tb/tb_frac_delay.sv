// tb_frac_delay: feeds random samples through the fractional delay at
// several delays, 3.8 samples among them, and compares each output with a
// floating-point linear interpolation of the input history,
// y[t] = (1-f)*x[t-1-Di] + f*x[t-2-Di], to within one LSB. It also checks
// that en low freezes the output.
module tb_frac_delay;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] x = 0, y;
  logic [11:0] delay = 12'd973;
  int checks = 0, failures = 0;
  int xs [$];

  frac_delay dut (.clk, .rst_n, .en, .x, .delay, .y);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] delays [6] = '{12'd973, 12'd0, 12'd128, 12'd3839, 12'd1024, 12'd4095};
    int di, t;
    real f, e;
    logic signed [15:0] held;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    t = 0;
    foreach (delays[d]) begin
      delay = delays[d];
      di = int'(delay >> 8);
      f  = real'(delay & 12'hFF) / 256.0;
      for (int c = 0; c < 300; c++) begin
        x = 16'($urandom);
        xs.push_back(int'(x));
        @(posedge clk); #1;
        t++;
        // xs[t-1] was presented before this edge; y uses x[t-1-Di], x[t-2-Di]
        if (c > 20) begin
          e = (1.0 - f) * real'(xs[t-1-di]) + f * real'(xs[t-2-di]);
          checks++;
          if (abs_r(real'(y) - e) > 1.0) begin
            failures++;
            if (failures < 10) $display("delay %0d: y=%0d expected %f", delay, y, e);
          end
        end
      end
    end
    en = 0;
    held = y;
    repeat (5) begin
      x = 16'($urandom);
      @(posedge clk);
    end
    #1;
    checks++;
    if (y !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
