// tb_ipm_b_reg: checks the operand B register.
// Loads random operands, then changes the pins for several cycles without LD
// and checks the held value; checks MCLR clearing and MCLR priority over LD.
module tb_ipm_b_reg;
  localparam int unsigned N = 8;
  logic clk = 0, mclr, ld;
  logic [N-1:0] b, q, exp_q;
  int checks = 0, failures = 0;

  ipm_b_reg #(.N(N)) dut (.clk, .mclr, .ld, .b, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mclr = 1; ld = 1; b = 8'h5a;
    @(negedge clk); mclr = 0; ld = 0;
    checks++; if (q !== '0) begin failures++; $display("FAIL mclr priority"); end
    for (int t = 0; t < 100; t++) begin
      exp_q = N'($urandom);
      b = exp_q; ld = 1;
      @(negedge clk); ld = 0;
      for (int k = 0; k < 4; k++) begin
        b = N'($urandom);
        checks++;
        if (q !== exp_q) begin failures++; $display("FAIL hold q=%h exp=%h", q, exp_q); end
        @(negedge clk);
      end
    end
    mclr = 1; @(negedge clk); mclr = 0;
    checks++; if (q !== '0) begin failures++; $display("FAIL mclr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
