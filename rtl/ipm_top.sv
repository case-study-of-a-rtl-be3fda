// ipm_top: quasi-serial two's complement inner product machine.
//
// Computes P <- P + A*B for 8-bit two's complement A and B into a 16-bit
// two's complement P, one product bit per column step. MCLR sets P = 0. LD
// loads A and B and presets the carries; the next 16 column steps (shift = 1)
// each produce one bit p(i) of the new P, lowest first. P is valid on the
// pins once the 16th step has been taken, and stays so until the next step.
// A sum beyond 16 bits wraps: there are no overflow bits.
//
// Datapath per column i:
//   A register taps a(i-j) -> gate row (7 AND, 1 NAND with b7) -> column tree,
//   which adds the eight bits and the carry number left by column i-1 ->
//   column sum bit -> accumulate adder, which adds p(i) (leaving the P
//   register at p0) and its own one-bit carry -> new p(i) enters at p15.
//
// Timing: one clock edge per column step, so one multiply/add takes an LD
// cycle plus 16 step cycles. The chip has no sequencer; whoever drives it
// counts the steps. The original chip was clocked by two non-overlapping
// phases; here a single rising-edge clock stands for one phi1/phi2 pair, and
// shift marks the clock pulses actually delivered. Priority: mclr, ld, shift.
// The structure (registers, gates, tree, accumulate adder, carry registers) is
// the document's; the single clock, the shift enable and clearing every
// register on MCLR are this design's choices.
//
// An assertion checks the driving rule: at most 16 column steps per LD, and
// none after MCLR until the next LD. The step counter behind it drives no
// output and is removed by synthesis.
module ipm_top (
  input  logic                     clk,
  input  logic                     mclr,
  input  logic                     ld,
  input  logic                     shift,
  input  logic [ipm_pkg::N-1:0]    a,
  input  logic [ipm_pkg::N-1:0]    b,
  output logic [ipm_pkg::PW-1:0]   p
);
  import ipm_pkg::*;

  logic          step;        // a column step actually taken
  logic [N-1:0]  tap, bq, g;
  logic          col_s;       // column sum bit
  logic [CW-1:0] tc_q, tc_d;  // tree carries
  logic          ac_q, ac_d;  // accumulate-adder carry
  logic          p_in, p_out;

  assign step = shift & ~ld & ~mclr;

  ipm_a_reg #(.N(N)) u_a (
    .clk, .mclr, .ld, .shift(step), .a, .tap
  );

  ipm_b_reg #(.N(N)) u_b (
    .clk, .mclr, .ld, .b, .q(bq)
  );

  ipm_pp_gates #(.N(N)) u_gates (
    .tap, .b(bq), .g
  );

  ipm_column_tree u_tree (
    .g, .cin(tc_q), .s(col_s), .cout(tc_d)
  );

  ipm_carry_reg #(.W(CW), .INIT(CW'(1))) u_tree_carry (
    .clk, .mclr, .ld, .shift(step), .d(tc_d), .q(tc_q)
  );

  ipm_full_adder u_acc (
    .a(col_s), .b(p_out), .ci(ac_q), .s(p_in), .co(ac_d)
  );

  ipm_carry_reg #(.W(1), .INIT(1'b0)) u_acc_carry (
    .clk, .mclr, .ld, .shift(step), .d(ac_d), .q(ac_q)
  );

  ipm_p_reg #(.W(PW)) u_p (
    .clk, .mclr, .shift(step), .sin(p_in), .p, .sout(p_out)
  );

  // Protocol check: steps taken since the last LD; PW means "no product open".
  localparam int unsigned SDW = $clog2(PW + 1);
  localparam logic [SDW-1:0] NO_PRODUCT = SDW'(PW);
  logic [SDW-1:0] steps_done;

  always_ff @(posedge clk) begin
    if (mclr)                        steps_done <= NO_PRODUCT;
    else if (ld)                     steps_done <= '0;
    else if (step && steps_done < NO_PRODUCT) steps_done <= steps_done + 1'b1;
  end

  a_max_steps: assert property (@(posedge clk) disable iff (mclr) step |-> steps_done < NO_PRODUCT)
    else $error("column step with no multiply/add open: more than %0d steps after LD", PW);
endmodule
