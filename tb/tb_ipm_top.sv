// tb_ipm_top: end-to-end test of the inner product machine at its default
// (document) sizes.
//
// The chip has no sequencer, so this testbench plays the user's external
// timing counter: for each element pair it raises LD for one cycle with A and
// B on the pins, then gives 16 column steps, and reads P. The expected value
// is the running sum of signed products, kept here modulo 2^16. It runs many
// inner products of random length with random and corner operands, and makes
// each mechanism happen and counts it:
//   clear     MCLR sets P = 0 (also once in the middle of a product)
//   load      LD starts a multiply/add
//   neg_a     negative A, exercising sign extension in the A register
//   neg_b     negative B, exercising the NAND row and the +1 preset
//   min_min   (-128) * (-128), the largest product
//   wrap      the true sum leaves the 16-bit range and P wraps
//   stall     column steps withheld for some cycles in mid-product
//   ld_shift  LD given while shift is also high (LD must win)
// The latency is checked too: P must hold the new value after exactly one LD
// cycle plus 16 step cycles, and must then stay put while no steps are given.
module tb_ipm_top;
  import ipm_pkg::*;

  logic clk = 0, mclr, ld, shift;
  logic [N-1:0]  a, b;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_neg_a = 0, n_neg_b = 0, n_min_min = 0;
  int n_wrap = 0, n_stall = 0, n_ld_shift = 0, n_products = 0;
  longint true_sum;            // unbounded reference sum
  logic [PW-1:0] exp_p;        // modulo 2^16 reference

  ipm_top dut (.clk, .mclr, .ld, .shift, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 20) $display("FAIL %s: p=%h expected %h", what, p, exp_p);
    end
  endtask

  task automatic clear_p();
    mclr = 1; @(negedge clk); mclr = 0;
    exp_p = '0; true_sum = 0; n_clear++;
    check("after MCLR");
  endtask

  // One multiply/add as the external counter would sequence it.
  task automatic mac(logic signed [N-1:0] av, logic signed [N-1:0] bv, bit stall, bit ld_with_shift);
    int cycles = 0;
    longint prod;
    a = av; b = bv; ld = 1; shift = ld_with_shift;
    @(negedge clk); cycles++;
    ld = 0; a = N'($urandom); b = N'($urandom);   // pins are free after LD
    n_load++;
    if (ld_with_shift) n_ld_shift++;
    for (int i = 0; i < PW; i++) begin
      if (stall && i == 7) begin
        shift = 0;
        repeat (3) @(negedge clk);
        cycles += 3;
        n_stall++;
      end
      shift = 1; @(negedge clk); cycles++;
    end
    shift = 0;
    prod = longint'(av) * longint'(bv);
    true_sum += prod;
    exp_p = exp_p + PW'(prod);
    if (av < 0) n_neg_a++;
    if (bv < 0) n_neg_b++;
    if (av == -128 && bv == -128) n_min_min++;
    if (true_sum > 32767 || true_sum < -32768) begin
      n_wrap++;
      true_sum = longint'(signed'(exp_p));
    end
    n_products++;
    checks++;
    if (cycles != 1 + PW + (stall ? 3 : 0)) begin
      failures++; $display("FAIL latency %0d cycles", cycles);
    end
    check($sformatf("after %0d*%0d", av, bv));
    // no steps given: P must hold
    repeat (2) @(negedge clk);
    check("idle hold");
  endtask

  initial begin
    logic signed [N-1:0] av, bv;
    int len;
    mclr = 0; ld = 0; shift = 0; a = '0; b = '0;
    exp_p = '0; true_sum = 0;
    @(negedge clk);
    clear_p();

    // corner products, each from P = 0 and then accumulated
    mac(8'sd1, 8'sd1, 0, 0);
    mac(-8'sd1, 8'sd1, 0, 0);
    mac(8'sd1, -8'sd1, 0, 0);
    mac(-8'sd1, -8'sd1, 0, 0);
    mac(-8'sd128, -8'sd128, 0, 0);
    mac(-8'sd128, 8'sd127, 0, 0);
    mac(8'sd127, -8'sd128, 1, 1);
    mac(8'sd127, 8'sd127, 0, 0);
    mac(8'sd0, -8'sd128, 0, 0);

    // force a wrap: two maximal products push the sum past 32767
    clear_p();
    mac(-8'sd128, -8'sd128, 0, 0);
    mac(-8'sd128, -8'sd128, 0, 0);
    mac(-8'sd128, -8'sd128, 0, 0);

    // random inner products of random length
    for (int v = 0; v < 200; v++) begin
      clear_p();
      len = 1 + ($urandom % 40);
      for (int k = 0; k < len; k++) begin
        av = N'($urandom); bv = N'($urandom);
        if ($urandom % 10 == 0) av = -8'sd128;
        if ($urandom % 10 == 0) bv = -8'sd128;
        mac(av, bv, ($urandom % 8) == 0, ($urandom % 8) == 0);
      end
    end

    // MCLR in the middle of a product wipes P; the next product starts clean
    a = 8'sd5; b = 8'sd7; ld = 1; @(negedge clk); ld = 0; shift = 1;
    repeat (5) @(negedge clk);
    shift = 0;
    clear_p();
    mac(8'sd3, -8'sd9, 0, 0);

    $display("products=%0d clear=%0d load=%0d neg_a=%0d neg_b=%0d min_min=%0d wrap=%0d stall=%0d ld_shift=%0d",
             n_products, n_clear, n_load, n_neg_a, n_neg_b, n_min_min, n_wrap, n_stall, n_ld_shift);
    checks++; if (n_clear    == 0) begin failures++; $display("FAIL clear never happened"); end
    checks++; if (n_load     == 0) begin failures++; $display("FAIL load never happened"); end
    checks++; if (n_neg_a    == 0) begin failures++; $display("FAIL neg_a never happened"); end
    checks++; if (n_neg_b    == 0) begin failures++; $display("FAIL neg_b never happened"); end
    checks++; if (n_min_min  == 0) begin failures++; $display("FAIL min_min never happened"); end
    checks++; if (n_wrap     == 0) begin failures++; $display("FAIL wrap never happened"); end
    checks++; if (n_stall    == 0) begin failures++; $display("FAIL stall never happened"); end
    checks++; if (n_ld_shift == 0) begin failures++; $display("FAIL ld_shift never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
