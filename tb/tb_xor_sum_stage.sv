// tb_xor_sum_stage: test of the XOR post-processing stage.
// Random half sums and carries; each expected sum bit is the parity of the
// half sum and the carry one position lower (none into bit 0).
module tb_xor_sum_stage;
  localparam int unsigned W = 32;   // the module's default width
  logic [W-1:0] d, c, s;
  logic cout;
  int checks = 0, failures = 0;

  xor_sum_stage dut (.d(d), .c(c), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      d = $urandom; c = $urandom;
      #1;
      for (int i = 0; i < W; i++) begin
        automatic int ones = int'(d[i]) + ((i > 0) ? int'(c[i-1]) : 0);
        checks++;
        if (s[i] !== (ones == 1)) begin
          failures++;
          $display("FAIL bit %0d d=%h c=%h s=%h", i, d, c, s);
        end
      end
      checks++;
      if (cout !== c[W-1]) begin
        failures++;
        $display("FAIL cout c=%h cout=%b", c, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
