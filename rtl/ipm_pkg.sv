// ipm_pkg: sizes shared by the quasi-serial inner product machine.
//
// The machine computes P <- P + A*B with 8-bit two's complement operands A, B
// and a 16-bit two's complement accumulator P (no overflow bits). One
// multiply/add takes 2N column steps, one per bit of P. The carry register of
// the column tree holds a binary count of the carries passed from one column
// to the next; with eight column bits and at most seven incoming carries a
// column total is at most 15, so three bits are enough. The operand and
// result widths are the document's; the carry width follows from them.
package ipm_pkg;
  localparam int unsigned N       = 8;          // operand width
  localparam int unsigned PW      = 2 * N;      // accumulator width = column steps per product
  localparam int unsigned CW      = 3;          // tree carry register width
endpackage
