// tb_ipm_carry_reg: checks the carry register as the tree uses it (3 bits,
// preset 1). Random mclr/ld/shift/d stimulus is compared every cycle with a
// reference register kept here, priority mclr, ld, shift.
module tb_ipm_carry_reg;
  logic clk = 0, mclr, ld, shift;
  logic [2:0] d, q, ref_q;
  int checks = 0, failures = 0;

  ipm_carry_reg #(.W(3), .INIT(3'd1)) dut (.clk, .mclr, .ld, .shift, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mclr = 1; ld = 0; shift = 0; d = '0; ref_q = '0;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL t=%0d q=%0d ref=%0d", t, q, ref_q); end
      mclr  = ($urandom % 20) == 0;
      ld    = ($urandom % 6) == 0;
      shift = ($urandom % 3) != 0;
      d     = 3'($urandom);
      if (mclr)       ref_q = '0;
      else if (ld)    ref_q = 3'd1;
      else if (shift) ref_q = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
