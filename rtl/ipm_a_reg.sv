// ipm_a_reg: operand A shift register of the quasi-serial multiplier.
//
// On LD the register takes a(N-1)..a0 in its upper N cells and zeros in its
// lower N-1 cells. Each column step shifts it right by one; the top (sign)
// cell keeps its value, so A is sign-extended as it moves. Tap j is cell
// N-1-j, so during column i (after i steps) tap[j] holds a(i-j): zero for
// i < j, a(N-1) once i-j >= N. The gate row ANDs tap[j] with b[j] to form
// column i of the partial-product bit matrix.
//
// Layout, loading and sign feedback follow the block diagram; which cells are
// tapped is fixed by the need for column 0 to be a0*b0. MCLR clears the
// register, which the original does not specify. Priority: mclr, ld, shift.
// Registers change on the rising clock edge.
module ipm_a_reg #(
  parameter int unsigned N = ipm_pkg::N
) (
  input  logic         clk,
  input  logic         mclr,
  input  logic         ld,
  input  logic         shift,
  input  logic [N-1:0] a,
  output logic [N-1:0] tap
);
  localparam int unsigned AW = 2 * N - 1;

  logic [AW-1:0] r;

  always_ff @(posedge clk) begin
    if (mclr)       r <= '0;
    else if (ld)    r <= {a, {(N-1){1'b0}}};
    else if (shift) r <= {r[AW-1], r[AW-1:1]};
  end

  always_comb
    for (int j = 0; j < N; j++) tap[j] = r[N-1-j];
endmodule
