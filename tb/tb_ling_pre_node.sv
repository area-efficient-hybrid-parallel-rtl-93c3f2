// tb_ling_pre_node: exhaustive test of the first-level Ling node.
// All 16 combinations of (g_i, g_i-1, p_i-1, p_i-2); expected G* is 1 when
// at least one generate is set, expected P* when both propagates are set.
module tb_ling_pre_node;
  logic g_i, g_im1, p_im1, p_im2;
  ling_pkg::gp_t gp;
  int checks = 0, failures = 0;

  ling_pre_node dut (.g_i(g_i), .g_im1(g_im1), .p_im1(p_im1), .p_im2(p_im2), .gp(gp));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_i, g_im1, p_im1, p_im2} = 4'(v);
      #1;
      checks++;
      if (gp.g !== (int'(g_i) + int'(g_im1) > 0) || gp.p !== (int'(p_im1) + int'(p_im2) == 2)) begin
        failures++;
        $display("FAIL v=%b -> G*=%b P*=%b", 4'(v), gp.g, gp.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
