// tb_prefix_node: exhaustive test of the black prefix cell.
// The expected group generate is worked out as a carry question: the
// combined group generates if the upper group generates, or if it
// propagates and the lower group generates.
module tb_prefix_node;
  ling_pkg::gp_t hi, lo, y;
  int checks = 0, failures = 0;

  prefix_node dut (.hi(hi), .lo(lo), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eg, ep;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      if (hi.g) eg = 1'b1; else if (hi.p) eg = lo.g; else eg = 1'b0;
      ep = (hi.p == 1'b1) && (lo.p == 1'b1);
      checks++;
      if (y.g !== eg || y.p !== ep) begin
        failures++;
        $display("FAIL hi=%b lo=%b -> y=%b expected %b%b", hi, lo, y, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
