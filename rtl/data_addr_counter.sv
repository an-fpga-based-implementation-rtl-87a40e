// data_addr_counter: address counter of the input data memory.
//
// Advances by one for every symbol (`en` is the symbol-rate enable) and wraps
// from 2**AW-1 to 0, so the stored bit stream is sent over and over. `wrap`
// pulses in the cycle where the counter steps from its last address back to
// zero. The transmitter's description gives only that the memory is read
// through a counter at the symbol rate; the width and the wrap-around are
// this design's choices. Synchronous active-low reset to zero.
module data_addr_counter #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          wrap
);
  always_ff @(posedge clk) begin
    if (!rst_n)  addr <= '0;
    else if (en) addr <= addr + 1'b1;
  end

  assign wrap = en && (addr == {AW{1'b1}});
endmodule
