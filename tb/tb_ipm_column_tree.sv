// tb_ipm_column_tree: exhaustive check of the column adder tree.
// For all 2^11 combinations of the eight column bits and the 3-bit carry
// number, the total T = popcount(g) + cin is formed here and the outputs must
// give s = T mod 2 and cout = T / 2.
module tb_ipm_column_tree;
  logic [7:0] g;
  logic [2:0] cin, cout;
  logic s;
  int checks = 0, failures = 0;

  ipm_column_tree dut (.g, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 2048; v++) begin
      {cin, g} = 11'(v);
      #1;
      total = int'(cin);
      for (int j = 0; j < 8; j++) total += int'(g[j]);
      checks++;
      if (s !== total[0] || cout !== 3'(total >> 1)) begin
        failures++;
        if (failures < 10) $display("FAIL g=%b cin=%0d -> s=%0d cout=%0d (T=%0d)", g, cin, s, cout, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
