// ipm_column_tree: the adder tree that sums one column of the bit matrix.
//
// Inputs are the eight column bits g[7:0] from the gate row and the carries
// left by the previous column, kept as a 3-bit binary number cin (0..7).
// The tree forms T = popcount(g) + cin (at most 15) and returns its low bit as
// the column sum s and T >> 1 as the carry number cout for the next column.
//
// Seven full adders, as in the block diagram, arranged as a weighted counter:
//   weight 1: g[7:0] and cin[0]  -> four adders -> s, and four weight-2 carries
//   weight 2: those four and cin[1] -> two adders -> cout[0], two weight-4 carries
//   weight 4: those two and cin[2]  -> one adder  -> cout[1], cout[2]
// A weight-w bit of this column is a weight-w/2 bit of the next, which is why
// the outputs shift down one place into cout. The seven-adder count and the
// three-cell carry register fed back into the tree are from the block diagram;
// the exact adder-to-adder wiring here is this design's own. Combinational;
// its delay is the critical path of one column step (four adders deep).
module ipm_column_tree (
  input  logic [7:0] g,
  input  logic [2:0] cin,
  output logic       s,
  output logic [2:0] cout
);
  logic s1, s2, s3, s5;
  logic c1, c2, c3, c4, c5, c6;

  // weight 1
  ipm_full_adder u_fa1 (.a(cin[0]), .b(g[7]), .ci(g[0]), .s(s1), .co(c1));
  ipm_full_adder u_fa2 (.a(g[1]),   .b(g[2]), .ci(g[3]), .s(s2), .co(c2));
  ipm_full_adder u_fa3 (.a(g[4]),   .b(g[5]), .ci(g[6]), .s(s3), .co(c3));
  ipm_full_adder u_fa4 (.a(s1),     .b(s2),   .ci(s3),   .s(s),  .co(c4));
  // weight 2
  ipm_full_adder u_fa5 (.a(c1),     .b(c2),   .ci(c3),   .s(s5), .co(c5));
  ipm_full_adder u_fa6 (.a(s5),     .b(c4),   .ci(cin[1]), .s(cout[0]), .co(c6));
  // weight 4
  ipm_full_adder u_fa7 (.a(c5),     .b(c6),   .ci(cin[2]), .s(cout[1]), .co(cout[2]));
endmodule
