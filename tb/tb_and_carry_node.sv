// tb_and_carry_node: exhaustive test of the lower-half carry cell.
module tb_and_carry_node;
  logic h_i, p_i, c_i;
  int checks = 0, failures = 0;

  and_carry_node dut (.h_i(h_i), .p_i(p_i), .c_i(c_i));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {h_i, p_i} = 2'(v);
      #1;
      checks++;
      if (c_i !== (v == 3)) begin
        failures++;
        $display("FAIL h=%b p=%b -> c=%b", h_i, p_i, c_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
