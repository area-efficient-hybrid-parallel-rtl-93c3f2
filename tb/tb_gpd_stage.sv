// tb_gpd_stage: self-checking test of the pre-processing stage.
// Drives random and corner operands into a 32-bit instance and compares
// g, p and d bit by bit with a truth table of the two operand bits.
module tb_gpd_stage;
  localparam int unsigned W = 32;   // the module's default width
  logic [W-1:0] a, b, g, p, d;
  int checks = 0, failures = 0;

  gpd_stage dut (.a(a), .b(b), .g(g), .p(p), .d(d));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    for (int i = 0; i < W; i++) begin
      int n = int'(a[i]) + int'(b[i]);   // number of ones at this position
      checks++;
      if (g[i] !== (n == 2) || p[i] !== (n >= 1) || d[i] !== (n == 1)) begin
        failures++;
        $display("FAIL bit %0d a=%b b=%b -> g=%b p=%b d=%b", i, a[i], b[i], g[i], p[i], d[i]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; #1 check();
    a = '1; b = '0; #1 check();
    a = '0; b = '1; #1 check();
    a = '1; b = '1; #1 check();
    repeat (500) begin
      a = $urandom; b = $urandom;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
