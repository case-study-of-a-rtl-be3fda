// ipm_pp_gates: the gate row that forms one column of the bit matrix.
//
// For column i the inputs are tap[j] = a(i-j) and b[j]. Output bit j is
// a(i-j) AND b(j) for j < N-1, and NAND for the sign row j = N-1. Complementing
// the sign row (and adding one, done by presetting the carries) turns the
// subtraction of the b(N-1) row of a two's complement product into an
// addition, so every column is a plain sum of bits. One NAND and N-1 ANDs, as
// in the block diagram. Combinational.
module ipm_pp_gates #(
  parameter int unsigned N = ipm_pkg::N
) (
  input  logic [N-1:0] tap,
  input  logic [N-1:0] b,
  output logic [N-1:0] g
);
  always_comb begin
    g        = tap & b;
    g[N-1]   = ~(tap[N-1] & b[N-1]);
  end
endmodule
