// ipm_carry_reg: carry register between column steps.
//
// Holds the carries one column passes to the next. On LD, the start of a
// multiply/add, it is preset to INIT; on each column step it takes d. The
// machine uses two of them: a 3-bit one for the tree carries, preset to 1 to
// supply the "+1" that completes the two's complement of the sign row, and a
// 1-bit one for the carry of the accumulate adder, preset to 0 so that the
// carry out of bit 15 of the previous sum is dropped. The preset values follow
// the algorithm; placing the +1 in the tree carries is this design's choice.
// MCLR clears it. Priority: mclr, ld, shift. Rising clock edge.
module ipm_carry_reg #(
  parameter int unsigned W    = 1,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         mclr,
  input  logic         ld,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (mclr)       q <= '0;
    else if (ld)    q <= INIT;
    else if (shift) q <= d;
  end
endmodule
