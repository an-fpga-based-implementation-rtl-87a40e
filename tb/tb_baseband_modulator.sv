// tb_baseband_modulator: loads 32 random bits into a small (AW=5) input
// memory, runs three passes over it, and checks every output sample against
// the raised-cosine filter evaluated in floating point on the same bits:
// sample n (m = n/16, k = n%16) is the filter output for the history
// d[m-2], d[m-3], ..., d[m-6] (zeros before the start). It also checks the
// symbol tick (every 16 clocks) and the address wrap (every 32 symbols), and
// that the output holds while en is low.
module tb_baseband_modulator;
  import tb_ref_pkg::*;
  localparam int AW = 5;
  localparam int NB = 1 << AW;
  logic clk = 0, rst_n = 0, en = 0;
  logic mem_we = 0, mem_wdata = 0;
  logic [AW-1:0] mem_waddr = 0, rd_addr;
  logic signed [7:0] bb;
  logic sym_tick, wrap;
  int checks = 0, failures = 0;
  logic bits [NB];

  baseband_modulator #(.AW(AW)) dut (.clk, .rst_n, .en, .mem_we, .mem_waddr, .mem_wdata,
                                     .bb, .sym_tick, .wrap, .rd_addr);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_at(int m);
    if (m < 0) return 1'b0;
    return bits[m % NB];
  endfunction

  initial begin
    int ticks, wraps, nsamp;
    logic [4:0] h;
    real e;
    logic signed [7:0] held;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < NB; i++) begin
      bits[i] = 1'($urandom);
      if (i == 3 || i == 4) bits[i] = 1'b1;   // make sure both levels occur
      @(posedge clk);
      mem_we <= 1; mem_waddr <= AW'(i); mem_wdata <= bits[i];
    end
    @(posedge clk);
    mem_we <= 0;
    @(posedge clk);
    en <= 1;
    ticks = 0; wraps = 0;
    nsamp = 3 * NB * 16;
    for (int n = 0; n < nsamp; n++) begin
      @(posedge clk); #1;
      for (int j = 0; j < 5; j++) h[j] = bit_at(n / 16 - 2 - j);
      e = shaped(h, n % 16);
      checks++;
      if (abs_r(real'(bb) - e) > 0.51) begin
        failures++;
        if (failures < 10) $display("n=%0d bb=%0d expected %f", n, bb, e);
      end
      // sym_tick in the clock after sample n is high when that clock ends symbol
      checks++;
      if (sym_tick !== ((n % 16) == 14)) failures++;
      if (sym_tick) ticks++;
      if (wrap) wraps++;
    end
    checks++;
    if (ticks != 3 * NB) begin failures++; $display("ticks %0d", ticks); end
    checks++;
    if (wraps < 2) begin failures++; $display("wraps %0d", wraps); end
    en <= 0;
    @(posedge clk); #1;
    held = bb;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (bb !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
