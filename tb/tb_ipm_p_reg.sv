// tb_ipm_p_reg: checks the accumulator shift register against a reference
// model: random serial bits shifted in at the top with random idle cycles,
// parallel output and p0 serial output compared every cycle; MCLR clearing.
module tb_ipm_p_reg;
  localparam int unsigned W = 16;
  logic clk = 0, mclr, shift, sin, sout;
  logic [W-1:0] p, ref_p;
  int checks = 0, failures = 0;

  ipm_p_reg #(.W(W)) dut (.clk, .mclr, .shift, .sin, .p, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mclr = 1; shift = 1; sin = 1; ref_p = '0;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      checks++;
      if (p !== ref_p || sout !== ref_p[0]) begin
        failures++; $display("FAIL t=%0d p=%h ref=%h", t, p, ref_p);
      end
      mclr  = ($urandom % 50) == 0;
      shift = ($urandom % 4) != 0;
      sin   = 1'($urandom);
      if (mclr)       ref_p = '0;
      else if (shift) ref_p = {sin, ref_p[W-1:1]};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
