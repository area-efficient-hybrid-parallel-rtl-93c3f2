// tb_mod_carry_node: exhaustive test of the modified last-level cell.
// Expected carry: the Ling pseudo carry of the bit is the upper group
// generate, or the upper group propagate with the lower pseudo carry; the
// real carry is that pseudo carry gated by the bit propagate.
module tb_mod_carry_node;
  ling_pkg::gp_t hi;
  logic h_lo, p_i, c_i;
  int checks = 0, failures = 0;

  mod_carry_node dut (.hi(hi), .h_lo(h_lo), .p_i(p_i), .c_i(c_i));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic h, e;
      {hi.g, hi.p, h_lo, p_i} = 4'(v);
      #1;
      h = hi.g ? 1'b1 : (hi.p ? h_lo : 1'b0);
      e = p_i ? h : 1'b0;
      checks++;
      if (c_i !== e) begin
        failures++;
        $display("FAIL hi=%b h_lo=%b p_i=%b -> c=%b expected %b", hi, h_lo, p_i, c_i, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
