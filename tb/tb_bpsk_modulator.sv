// tb_bpsk_modulator: drives random baseband and carrier samples and checks
// both registered products one clock later, plus the 180-degree phase
// flip: negating the baseband negates the modulated output.
module tb_bpsk_modulator;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] bb = 0, car_cos = 0, car_sin = 0;
  logic signed [15:0] pb_i, pb_q;
  int checks = 0, failures = 0;

  bpsk_modulator dut (.clk, .rst_n, .bb, .car_cos, .car_sin, .pb_i, .pb_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq, first;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pb_i !== 0 || pb_q !== 0) failures++;
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      bb = 8'($urandom); car_cos = 8'($urandom); car_sin = 8'($urandom);
      if (c % 50 == 0) bb = -8'sd128;
      ei = int'(bb) * int'(car_cos);
      eq = int'(bb) * int'(car_sin);
      @(posedge clk); #1;
      checks += 2;
      if (int'(pb_i) != ei || int'(pb_q) != eq) begin
        failures++;
        if (failures < 10) $display("%0d*%0d = %0d, got %0d", bb, car_cos, ei, pb_i);
      end
    end
    // phase inversion between a 1 (+) and a 0 (-) baseband level
    bb = 8'sd64; car_cos = 8'sd100;
    @(posedge clk); #1;
    first = int'(pb_i);
    bb = -8'sd64;
    @(posedge clk); #1;
    checks++;
    if (first <= 0 || int'(pb_i) != -first) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
