// ipm_b_reg: operand B register.
//
// B is loaded in parallel on LD and held unchanged through all column steps
// of the multiply/add; bit j feeds the gate that forms the b(j) row of the
// partial-product matrix. MCLR clears it (a choice of this design; the
// original only names clearing P). Loads on the rising clock edge.
module ipm_b_reg #(
  parameter int unsigned N = ipm_pkg::N
) (
  input  logic         clk,
  input  logic         mclr,
  input  logic         ld,
  input  logic [N-1:0] b,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (mclr)    q <= '0;
    else if (ld) q <= b;
  end
endmodule
