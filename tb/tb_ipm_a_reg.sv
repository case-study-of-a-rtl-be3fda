// tb_ipm_a_reg: checks the operand A shift register.
// For random and corner operands it loads A, then takes 2N column steps and,
// before each step, compares every tap j with the sign-extended, zero-padded
// operand bit a(i-j) computed here. It also checks MCLR clearing, that the
// register holds when no step is given, and that LD wins over a step.
module tb_ipm_a_reg;
  localparam int unsigned N = 8;
  logic clk = 0, mclr, ld, shift;
  logic [N-1:0] a, tap;
  int checks = 0, failures = 0;

  ipm_a_reg #(.N(N)) dut (.clk, .mclr, .ld, .shift, .a, .tap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a(k) of the extended operand
  function automatic logic abit(logic [N-1:0] op, int k);
    if (k < 0) return 1'b0;
    if (k >= N) return op[N-1];
    return op[k];
  endfunction

  task automatic check_col(logic [N-1:0] op, int i);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (tap[j] !== abit(op, i - j)) begin
        failures++;
        $display("FAIL a=%h col=%0d tap[%0d]=%0d", op, i, j, tap[j]);
      end
    end
  endtask

  initial begin
    logic [N-1:0] op;
    mclr = 1; ld = 0; shift = 0; a = '0;
    @(negedge clk); mclr = 0;
    checks++; if (tap !== '0) begin failures++; $display("FAIL mclr"); end
    for (int t = 0; t < 40; t++) begin
      case (t)
        0: op = 8'h80; 1: op = 8'h7f; 2: op = 8'hff; 3: op = 8'h01;
        default: op = N'($urandom);
      endcase
      a = op; ld = 1; shift = (t % 2 == 0); // LD must win over a step
      @(negedge clk); ld = 0; a = ~op;
      for (int i = 0; i < 2 * N; i++) begin
        check_col(op, i);
        shift = 1; @(negedge clk);
        // one idle cycle now and then: the register must hold
        if (i == 3) begin
          shift = 0; @(negedge clk);
          check_col(op, i + 1);
        end
      end
      shift = 0;
    end
    mclr = 1; @(negedge clk); mclr = 0;
    checks++; if (tap !== '0) begin failures++; $display("FAIL mclr 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
