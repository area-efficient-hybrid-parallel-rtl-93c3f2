// tb_modified_ling_adder: self-checking test of the hybrid modified-Ling
// adder at several word sizes.
// Instances: the default (32 bits), 16, 8, 4 and 64 bits. The 4- and 8-bit
// adders are checked exhaustively, the others with corner operands and
// random operands of three kinds (uniform, operands that are nearly
// complementary so that carries run far, and sparse operands). The expected
// {cout, s} is the integer sum of the operands. For the exhaustive 8-bit
// adder the internal signals are checked too: the real carry of every bit,
// and for the lower half the Ling pseudo carry H_i = g_i | c_(i-1) that
// leaves the prefix trees, both worked out from the integer sum.
module tb_modified_ling_adder;
  logic [31:0] a32, b32, s32;  logic co32;
  logic [15:0] a16, b16, s16;  logic co16;
  logic [7:0]  a8,  b8,  s8;   logic co8;
  logic [3:0]  a4,  b4,  s4;   logic co4;
  logic [63:0] a64, b64, s64;  logic co64;
  int checks = 0, failures = 0;

  modified_ling_adder                u32 (.a(a32), .b(b32), .s(s32), .cout(co32));
  modified_ling_adder #(.WIDTH(16)) u16 (.a(a16), .b(b16), .s(s16), .cout(co16));
  modified_ling_adder #(.WIDTH(8))  u8  (.a(a8),  .b(b8),  .s(s8),  .cout(co8));
  modified_ling_adder #(.WIDTH(4))  u4  (.a(a4),  .b(b4),  .s(s4),  .cout(co4));
  modified_ling_adder #(.WIDTH(64)) u64 (.a(a64), .b(b64), .s(s64), .cout(co64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sum of the low w bits of a and b, w+1 bits wide
  function automatic logic [64:0] ref_sum(logic [63:0] a, logic [63:0] b, int w);
    logic [64:0] m = (65'd1 << w) - 65'd1;
    return ({1'b0, a} & m) + ({1'b0, b} & m);
  endfunction

  task automatic cmp(string tag, int w, logic [63:0] a, logic [63:0] b, logic [63:0] s, logic co);
    logic [64:0] e = ref_sum(a, b, w);
    logic [64:0] m = (65'd1 << w) - 65'd1;
    checks++;
    if ((({1'b0, s} & m) !== (e & m)) || (co !== e[w])) begin
      failures++;
      $display("FAIL %s a=%h b=%h -> s=%h cout=%b expected %h", tag, a, b, s, co, e);
    end
  endtask

  // carries and lower-half pseudo carries of the 8-bit instance
  task automatic check_internal8();
    logic [8:0] cin_vec = ({1'b0, a8} + {1'b0, b8}) ^ {1'b0, a8 ^ b8};  // carry into each bit
    logic [7:0] c_ref = cin_vec[8:1];                                    // carry out of each bit
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (u8.c[i] !== c_ref[i]) begin
        failures++;
        $display("FAIL w8 carry %0d a=%h b=%h", i, a8, b8);
      end
    end
    for (int i = 0; i < 4; i++) begin
      logic h_ref = (a8[i] & b8[i]) | ((i > 0) ? c_ref[i-1] : 1'b0);
      logic h_dut = (i % 2 == 0) ? u8.ev_out[i/2].g : u8.od_out[i/2].g;
      checks++;
      if (h_dut !== h_ref) begin
        failures++;
        $display("FAIL w8 pseudo carry H_%0d a=%h b=%h", i, a8, b8);
      end
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic apply(logic [63:0] a, logic [63:0] b);
    a64 = a; b64 = b; a32 = a[31:0]; b32 = b[31:0]; a16 = a[15:0]; b16 = b[15:0];
    #1;
    cmp("w64", 64, a64, b64, s64, co64);
    cmp("w32", 32, {32'b0, a32}, {32'b0, b32}, {32'b0, s32}, co32);
    cmp("w16", 16, {48'b0, a16}, {48'b0, b16}, {48'b0, s16}, co16);
  endtask

  initial begin
    // exhaustive 4 and 8 bit
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      {a4, b4} = 8'(i);
      #1;
      cmp("w8", 8, {56'b0, a8}, {56'b0, b8}, {56'b0, s8}, co8);
      check_internal8();
      if (i < 256) cmp("w4", 4, {60'b0, a4}, {60'b0, b4}, {60'b0, s4}, co4);
    end
    // corners: full ripple, all ones, alternating patterns
    apply('1, 64'd1);
    apply('1, '1);
    apply('0, '0);
    apply({32{2'b10}}, {32{2'b01}});
    apply({32{2'b10}}, {32{2'b11}});
    for (int k = 0; k < 64; k++) apply('1 >> k, 64'd1 << (63 - k));
    for (int k = 0; k < 64; k++) apply(64'd1 << k, (64'd1 << k) | ~(('1) << k));
    // random
    repeat (20000) begin
      automatic logic [63:0] a = rnd64();
      automatic logic [63:0] r = rnd64();
      case ($urandom % 3)
        0: apply(a, r);
        1: apply(a, ~a ^ (r & rnd64() & rnd64() & rnd64()));  // mostly propagating
        default: apply(a & rnd64() & rnd64(), r & rnd64());
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
