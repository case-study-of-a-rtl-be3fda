// ipm_p_reg: the inner-product (accumulator) shift register.
//
// A W-bit register with parallel outputs p (pins P0-P15). Each column step
// shifts it right: bit p0 leaves on sout and goes to the accumulate adder,
// and the new bit from that adder enters at p(W-1). After W steps every bit
// has passed through the adder once, so the register holds P + A*B with its
// bits back in place. MCLR clears it, which is how the chip is initialised to
// P = 0. LD does not touch it. Priority: mclr, shift. Rising clock edge.
module ipm_p_reg #(
  parameter int unsigned W = ipm_pkg::PW
) (
  input  logic         clk,
  input  logic         mclr,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] p,
  output logic         sout
);
  always_ff @(posedge clk) begin
    if (mclr)       p <= '0;
    else if (shift) p <= {sin, p[W-1:1]};
  end

  assign sout = p[0];
endmodule
