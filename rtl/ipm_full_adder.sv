// ipm_full_adder: one-bit carry-save adder cell.
//
// The cell adds three bits and gives a sum and a carry. It is written from the
// two logic equations of the original cell rather than as a + b + ci, so the
// carry is formed first and the sum reuses its complement:
//   co = a b + (a + b) ci
//   s  = ~co (a + b + ci) + a b ci
// Purely combinational. Seven of these cells make the column tree and an
// eighth adds each new column bit to the matching bit of the accumulator.
module ipm_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    co = (a & b) | ((a | b) & ci);
    s  = (~co & (a | b | ci)) | (a & b & ci);
  end
endmodule
