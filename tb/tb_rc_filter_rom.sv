// tb_rc_filter_rom: reads all 512 words of the pulse-shaping ROM and compares
// each with the raised-cosine filter output computed in floating point for
// the same 5-bit history and sample phase (within one LSB of rounding). It
// also checks the NRZ polarity (all ones positive, all zeros negative at the
// pulse peak), zero intersymbol interference at the bit centres, the odd symmetry between a history and its complement, and the
// one-clock read latency.
module tb_rc_filter_rom;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [8:0] addr = 0;
  logic signed [7:0] data;
  int checks = 0, failures = 0;
  logic signed [7:0] words [512];

  rc_filter_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_v;
    for (int a = 0; a < 512; a++) begin
      addr = 9'(a);
      @(posedge clk); #1;
      words[a] = data;
      exp_v = shaped(5'(a >> 4), a & 15);
      checks++;
      if (abs_r(real'(data) - exp_v) > 0.51) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0d expected %f", a, data, exp_v);
      end
    end
    // latency: change the address, the old word stays until the next edge
    addr = 9'h1F0;
    @(posedge clk); #1;
    addr = 9'h000;
    #2;
    checks++;
    if (data !== words[9'h1F0]) failures++;
    // NRZ polarity at the peak of the middle bit
    checks++;
    if (!(words[{5'b11111, 4'd0}] > 8'sd40)) failures++;
    checks++;
    if (!(words[{5'b00000, 4'd0}] < -8'sd40)) failures++;
    // zero intersymbol interference: at the centre of a bit (k = 0) the
    // raised-cosine tails of the neighbours vanish, so the word is +-64
    // and depends only on the bit at the filter centre (history bit 2)
    for (int b = 0; b < 32; b++) begin
      checks++;
      if (words[{5'(b), 4'd0}] !== (b[2] ? 8'sd64 : -8'sd64)) begin
        failures++;
        $display("ISI at history %b: %0d", 5'(b), words[{5'(b), 4'd0}]);
      end
    end
    // complementing the history negates the output (to within rounding)
    for (int a = 0; a < 512; a++) begin
      int s;
      s = int'(words[a]) + int'(words[{~5'(a >> 4), 4'(a)}]);
      checks++;
      if (s > 1 || s < -1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
