// tb_ipm_full_adder: exhaustive check of the carry-save adder cell.
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic sum a + b + ci. No clock; a watchdog bounds the run time.
module tb_ipm_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  ipm_full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
