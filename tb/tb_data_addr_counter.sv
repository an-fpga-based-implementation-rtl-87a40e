// tb_data_addr_counter: steps a 4-bit address counter with a random enable
// and checks the address and the wrap pulse against a reference count.
module tb_data_addr_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] addr;
  logic wrap;
  int checks = 0, failures = 0, ref_a = 0, wraps = 0;

  data_addr_counter #(.AW(4)) dut (.clk, .rst_n, .en, .addr, .wrap);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 500; c++) begin
      en = ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (wrap !== (en && ref_a == 15)) failures++;
      if (wrap) wraps++;
      @(posedge clk); #1;
      if (en) ref_a = (ref_a + 1) % 16;
      checks++;
      if (addr !== 4'(ref_a)) begin
        failures++;
        if (failures < 10) $display("addr %0d expected %0d", addr, ref_a);
      end
    end
    checks++;
    if (wraps < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
