// tb_ipm_pp_gates: exhaustive check of the gate row over all 2^16 pairs of
// tap and b words: bits 0..6 must be the AND, bit 7 the NAND.
module tb_ipm_pp_gates;
  localparam int unsigned N = 8;
  logic [N-1:0] tap, b, g, e;
  int checks = 0, failures = 0;

  ipm_pp_gates #(.N(N)) dut (.tap, .b, .g);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {tap, b} = 16'(v);
      #1;
      for (int j = 0; j < N; j++)
        e[j] = (j == N - 1) ? !(tap[j] && b[j]) : (tap[j] && b[j]);
      checks++;
      if (g !== e) begin
        failures++;
        if (failures < 10) $display("FAIL tap=%h b=%h g=%h exp=%h", tap, b, g, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
