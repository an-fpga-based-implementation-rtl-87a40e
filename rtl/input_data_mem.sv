// input_data_mem: block memory that holds the formatted bit stream.
//
// A simple dual-port RAM, one bit wide and 2**AW deep, in the style of an
// FPGA block RAM. The write port (`we`, `waddr`, `wdata`) loads the bits that
// come out of the off-chip formatting step (sampling and quantizing the
// source); the read port returns the bit at `raddr` one cycle after `re`, and
// holds it while `re` is low. The read register resets to 0. The memory
// itself is not reset: it must be written before it is read. Storing the
// stream in block memory follows the transmitter's description; the width,
// the depth and the write port are this design's choices.
module input_data_mem #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  logic mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= 1'b0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
