// tb_hybrid_ling_adders_top: end-to-end test of both adders at their
// default sizes (16 and 32 bits).
// Each vector is applied to both adders and {cout, s} is compared with the
// integer sum. The testbench also classifies every vector by the carry
// mechanisms it exercises and fails if one of them never occurred:
//   - a carry out of the word (cout = 1);
//   - a carry rippling through every bit (all-ones plus one);
//   - an upper-half carry of an even bit that exists only because of the
//     pseudo carry merged in from the lower half by the modified cell
//     (clearing operand bits 0..W/2-2 removes it);
//   - the same for an odd bit (clearing bits 0..i-W/2 removes it);
//   - a lower-half carry formed by the AND cell (c_i = 1 for some i < W/2).
module tb_hybrid_ling_adders_top;
  logic [15:0] a16, b16, s16;  logic cout16;
  logic [31:0] a32, b32, s32;  logic cout32;
  int checks = 0, failures = 0;
  int n_cout = 0, n_ripple = 0, n_even_lo = 0, n_odd_lo = 0, n_low_and = 0;

  hybrid_ling_adders_top dut (
    .a16(a16), .b16(b16), .s16(s16), .cout16(cout16),
    .a32(a32), .b32(b32), .s32(s32), .cout32(cout32)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry out of bit i of a + b over w bits
  function automatic logic carry_of(logic [31:0] a, logic [31:0] b, int w, int i);
    logic [32:0] m = (33'd1 << (i + 1)) - 33'd1;
    logic [32:0] t = ({1'b0, a} & m) + ({1'b0, b} & m);
    return (i < w) ? t[i+1] : 1'b0;
  endfunction

  task automatic classify(logic [31:0] a, logic [31:0] b, int w);
    logic [31:0] m = (w == 32) ? '1 : ((32'd1 << w) - 32'd1);
    if ((((a & m) == m) && ((b & m) == 32'd1))) n_ripple++;
    if (carry_of(a, b, w, w - 1)) n_cout++;
    for (int i = 0; i < w / 2; i++)
      if (carry_of(a, b, w, i)) begin n_low_and++; break; end
    for (int i = w / 2; i < w; i++) begin
      int lo = (i % 2 == 0) ? (w / 2 - 2) : (i - w / 2);
      logic [31:0] keep = ~((32'd2 << lo) - 32'd1);  // clears bits 0..lo
      if (carry_of(a, b, w, i) && !carry_of(a & keep, b & keep, w, i)) begin
        if (i % 2 == 0) n_even_lo++; else n_odd_lo++;
      end
    end
  endtask

  task automatic apply(logic [31:0] a, logic [31:0] b);
    logic [32:0] e32;
    logic [16:0] e16;
    a32 = a; b32 = b; a16 = a[15:0]; b16 = b[15:0];
    #1;
    e32 = {1'b0, a} + {1'b0, b};
    e16 = {1'b0, a[15:0]} + {1'b0, b[15:0]};
    checks++;
    if ({cout32, s32} !== e32) begin
      failures++;
      $display("FAIL 32-bit a=%h b=%h -> %b_%h expected %h", a, b, cout32, s32, e32);
    end
    checks++;
    if ({cout16, s16} !== e16) begin
      failures++;
      $display("FAIL 16-bit a=%h b=%h -> %b_%h expected %h", a[15:0], b[15:0], cout16, s16, e16);
    end
    classify(a, b, 32);
    classify(a, b, 16);
  endtask

  initial begin
    apply(32'hFFFF_FFFF, 32'h0000_0001);
    apply(32'h0000_FFFF, 32'h0000_0001);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'h0, 32'h0);
    for (int k = 0; k < 32; k++) apply(32'hFFFF_FFFF >> k, 32'd1 << (31 - k));
    repeat (20000) begin
      automatic logic [31:0] a = $urandom;
      automatic logic [31:0] r = $urandom;
      if (($urandom % 2) != 0) apply(a, r);
      else apply(a, ~a ^ (r & $urandom & $urandom));  // long propagate runs
    end
    $display("mechanisms: cout=%0d full_ripple=%0d even_upper_from_lower=%0d odd_upper_from_lower=%0d lower_and_carry=%0d",
             n_cout, n_ripple, n_even_lo, n_odd_lo, n_low_and);
    if (n_cout == 0)    begin failures++; $display("FAIL no carry-out seen"); end
    if (n_ripple == 0)  begin failures++; $display("FAIL no full ripple seen"); end
    if (n_even_lo == 0) begin failures++; $display("FAIL no even upper carry from lower half"); end
    if (n_odd_lo == 0)  begin failures++; $display("FAIL no odd upper carry from lower half"); end
    if (n_low_and == 0) begin failures++; $display("FAIL no lower-half carry"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
