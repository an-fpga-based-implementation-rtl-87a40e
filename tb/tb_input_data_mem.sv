// tb_input_data_mem: writes random bits to a 64-bit memory, reads them back
// in random order, and checks the one-clock read latency and that the read
// data holds while the read enable is low.
module tb_input_data_mem;
  logic clk = 0, rst_n = 0, we = 0, wdata = 0, re = 0, rdata;
  logic [5:0] waddr = 0, raddr = 0;
  logic model [64];
  logic last;
  int checks = 0, failures = 0;

  input_data_mem #(.AW(6)) dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    @(posedge clk); #1;
    checks++;
    if (rdata !== 1'b0) failures++;
    for (int i = 0; i < 64; i++) begin
      we = 1; waddr = 6'(i); wdata = 1'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    last = 0;
    for (int c = 0; c < 400; c++) begin
      re = ($urandom_range(0, 2) != 0);
      raddr = 6'($urandom);
      if (re) last = model[raddr];
      @(posedge clk); #1;
      checks++;
      if (rdata !== last) begin
        failures++;
        if (failures < 10) $display("read %0d expected %0d", rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
