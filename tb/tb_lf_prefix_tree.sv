// tb_lf_prefix_tree: self-checking test of the Ladner-Fischer prefix network.
// Three instances: 16 elements with all levels, 16 elements with one level
// less and 8 elements with one level less (the two ways the adders use it).
// After l levels, element j must hold the serial prefix of the elements
// from the lowest one its span reaches up to j; the testbench folds that
// span one element at a time and compares. Propagate bits are biased
// towards 1 so that long spans matter.
module tb_lf_prefix_tree;
  ling_pkg::gp_t [15:0] x, y_full, y_part;
  ling_pkg::gp_t [7:0]  x8, y8;
  int checks = 0, failures = 0;

  lf_prefix_tree                        u_full (.x(x),  .y(y_full));
  lf_prefix_tree #(.N(16), .LEVELS(3)) u_part (.x(x),  .y(y_part));
  lf_prefix_tree #(.N(8),  .LEVELS(2)) u_8    (.x(x8), .y(y8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial prefix of elements lo..j of v
  function automatic ling_pkg::gp_t fold(ling_pkg::gp_t [15:0] v, int lo, int j);
    ling_pkg::gp_t acc = v[lo];
    for (int k = lo + 1; k <= j; k++) begin
      acc.g = v[k].g | (v[k].p & acc.g);
      acc.p = v[k].p & acc.p;
    end
    return acc;
  endfunction

  function automatic int span_lo(int j, int l);
    return (j / (1 << l)) * (1 << l);
  endfunction

  task automatic cmp(string tag, int n, int l, ling_pkg::gp_t [15:0] v, ling_pkg::gp_t [15:0] got);
    for (int j = 0; j < n; j++) begin
      ling_pkg::gp_t e = fold(v, span_lo(j, l), j);
      checks++;
      if (got[j] !== e) begin
        failures++;
        $display("FAIL %s element %0d: got %b expected %b", tag, j, got[j], e);
      end
    end
  endtask

  initial begin
    repeat (2000) begin
      for (int j = 0; j < 16; j++) begin
        x[j].g = ($urandom % 4) == 0;
        x[j].p = ($urandom % 4) != 0;
      end
      x8 = x[7:0];
      #1;
      cmp("full", 16, 4, x, y_full);
      cmp("part", 16, 3, x, y_part);
      cmp("n8",    8, 2, {8'b0, x8}, {8'b0, y8});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
