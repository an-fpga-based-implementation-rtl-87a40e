// tb_sincos_lut: reads every phase of the sine/cosine table and compares
// sin_o with 127*sin(2*pi*p/1024) and cos_o with 127*cos(2*pi*p/1024),
// computed in floating point (within rounding), after one clock of latency.
module tb_sincos_lut;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [9:0] phase = 0;
  logic signed [7:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  sincos_lut dut (.clk, .phase, .sin_o, .cos_o);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real es, ec;
    for (int p = 0; p < 1024; p++) begin
      phase = 10'(p);
      @(posedge clk); #1;
      es = sin_ref(p);
      ec = 127.0 * $cos(2.0 * PI * real'(p) / 1024.0);
      checks += 2;
      if (abs_r(real'(sin_o) - es) > 0.51) failures++;
      if (abs_r(real'(cos_o) - ec) > 0.51) begin
        failures++;
        if (failures < 10) $display("phase %0d cos %0d expected %f", p, cos_o, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
