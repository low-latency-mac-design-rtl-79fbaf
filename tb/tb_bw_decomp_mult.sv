// tb_bw_decomp_mult: self-checking test of the decomposition multiplier.
// The default 8 x 8 unit (four 4 x 4 Baugh-Wooley blocks) is checked
// exhaustively in all four operand formats (each operand signed or
// unsigned): ps + pc modulo 2^16 must equal the product. A copy with a 20-bit
// output checks that the carry-save pair carries the correct sign or zero
// extension. The three 16 x 16 structures are checked on random operands:
// from sixteen 4 x 4 blocks (several compressor rows), from four 8 x 8
// Baugh-Wooley blocks, and from four 8 x 8 decomposition units.
module tb_bw_decomp_mult;
  logic [7:0]  a, b;
  logic        tc, sa, sb;
  logic [15:0] ps, pc;
  logic [19:0] ps20, pc20;
  logic [15:0] a16, b16;
  logic [31:0] ps_a, pc_a, ps_b, pc_b, ps_c, pc_c;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  bw_decomp_mult dut (.a(a), .b(b), .a_signed(sa), .b_signed(sb), .ps(ps), .pc(pc));
  bw_decomp_mult #(.OUT_W(20)) dut20 (
    .a(a), .b(b), .a_signed(sa), .b_signed(sb), .ps(ps20), .pc(pc20));
  bw_decomp_mult #(.N(16), .SUB(4)) dut16_4 (
    .a(a16), .b(b16), .a_signed(tc), .b_signed(tc), .ps(ps_a), .pc(pc_a));
  bw_decomp_mult #(.N(16), .SUB(8)) dut16_8 (
    .a(a16), .b(b16), .a_signed(tc), .b_signed(tc), .ps(ps_b), .pc(pc_b));
  bw_decomp_mult #(.N(16), .SUB(8), .LEAF(4)) dut16_84 (
    .a(a16), .b(b16), .a_signed(tc), .b_signed(tc), .ps(ps_c), .pc(pc_c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint value(longint raw, int n, bit signed_fmt);
    if (signed_fmt && raw[n-1]) return raw - (longint'(1) << n);
    return raw;
  endfunction

  initial begin
    longint expected;
    for (int m = 0; m < 4; m++) begin
      sa = m[1];
      sb = m[0];
      tc = m[0];
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          a = 8'(x); b = 8'(y);
          #1;
          expected = value(longint'(x), 8, sa) * value(longint'(y), 8, sb);
          checks++;
          if (16'(ps + pc) != 16'(expected)) begin
            failures++;
            if (failures < 20)
              $display("FAIL 8x8 sa=%b sb=%b %0d*%0d: got %h want %h", sa, sb,
                       value(longint'(x), 8, sa), value(longint'(y), 8, sb), 16'(ps + pc), 16'(expected));
          end
          checks++;
          if (20'(ps20 + pc20) != 20'(expected)) begin
            failures++;
            if (failures < 20)
              $display("FAIL 8x8/20 sa=%b sb=%b %0d*%0d: got %h want %h", sa, sb,
                       value(longint'(x), 8, sa), value(longint'(y), 8, sb), 20'(ps20 + pc20), 20'(expected));
          end
        end
      end
      for (int n = 0; n < 20000; n++) begin
        a16 = 16'($urandom);
        b16 = 16'($urandom);
        if (n == 0) begin a16 = 16'h8000; b16 = 16'h8000; end
        if (n == 1) begin a16 = 16'hffff; b16 = 16'hffff; end
        #1;
        expected = value(longint'(a16), 16, tc) * value(longint'(b16), 16, tc);
        checks += 3;
        if (32'(ps_a + pc_a) != 32'(expected)) begin
          failures++;
          $display("FAIL 16x16/4 tc=%b %h*%h: got %h want %h", tc, a16, b16,
                   32'(ps_a + pc_a), 32'(expected));
        end
        if (32'(ps_b + pc_b) != 32'(expected)) begin
          failures++;
          $display("FAIL 16x16/8 tc=%b %h*%h: got %h want %h", tc, a16, b16,
                   32'(ps_b + pc_b), 32'(expected));
        end
        if (32'(ps_c + pc_c) != 32'(expected)) begin
          failures++;
          $display("FAIL 16x16/8/4 tc=%b %h*%h: got %h want %h", tc, a16, b16,
                   32'(ps_c + pc_c), 32'(expected));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
