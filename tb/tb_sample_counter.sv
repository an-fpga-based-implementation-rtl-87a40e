// tb_sample_counter: checks the modulo-16 count, its hold while disabled and
// the symbol tick (one clock in 16 while enabled) against a reference count.
module tb_sample_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] cnt;
  logic sym_tick;
  int checks = 0, failures = 0;
  int ref_cnt = 0, ticks = 0;

  sample_counter dut (.clk, .rst_n, .en, .cnt, .sym_tick);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      en <= (c < 400) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) ref_cnt = (ref_cnt + 1) % 16;
      checks++;
      if (cnt !== 4'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("cnt %0d expected %0d", cnt, ref_cnt);
      end
      checks++;
      if (sym_tick !== (en && ref_cnt == 15)) failures++;
      if (sym_tick) ticks++;
    end
    // 400 fully enabled clocks alone give 25 ticks
    checks++;
    if (ticks < 25) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
