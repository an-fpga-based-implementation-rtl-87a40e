// shift_reg5: the 5-bit shift register in front of the pulse-shaping ROM.
//
// On every symbol-rate enable the next data bit enters at bit 0 and the
// oldest bit leaves from bit W-1, so q[0] is the newest bit and q[W-1] the
// oldest. The five bits are the ROM address MSBs: they select one of 32
// chunks of precomputed filter outputs. The 5-bit length follows the
// transmitter's description; the bit order is this design's choice and is
// matched by the ROM contents. Synchronous active-low reset to all zeros
// (a run of -1 symbols after NRZ mapping).
module shift_reg5 #(
  parameter int unsigned W = tx_pkg::WINDOW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[W-2:0], din};
  end
endmodule
