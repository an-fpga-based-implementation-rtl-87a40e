// tb_shift_reg5: shifts random bits in under a random enable and checks that
// q[j] is always the j-th most recent accepted bit (q[0] newest).
module tb_shift_reg5;
  logic clk = 0, rst_n = 0, en = 0, din = 0;
  logic [4:0] q;
  logic hist [$];
  int checks = 0, failures = 0;

  shift_reg5 dut (.clk, .rst_n, .en, .din, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) hist.push_front(1'b0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 500; c++) begin
      en = ($urandom_range(0, 2) != 0);
      din = 1'($urandom);
      @(posedge clk); #1;
      if (en) hist.push_front(din);
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (q[j] !== hist[j]) begin
          failures++;
          if (failures < 10) $display("q[%0d]=%0d expected %0d", j, q[j], hist[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
