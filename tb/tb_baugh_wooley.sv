// tb_baugh_wooley: exhaustive self-checking test of the Baugh-Wooley array.
// The 4 x 4 block (default size) and an 8 x 8 instance are driven with every
// operand pair in all four operand formats (signed/unsigned a and b). The
// expected product is computed with the simulator's own integer arithmetic,
// interpreting each operand as two's complement or unsigned.
module tb_baugh_wooley;
  logic [3:0]  a4, b4;
  logic [7:0]  o4;
  logic [7:0]  a8, b8;
  logic [15:0] o8;
  logic        sa, sb;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  baugh_wooley dut4 (.a(a4), .b(b4), .a_signed(sa), .b_signed(sb), .o(o4));
  baugh_wooley #(.N(8)) dut8 (.a(a8), .b(b8), .a_signed(sa), .b_signed(sb), .o(o8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value(int raw, int n, bit signed_fmt);
    if (signed_fmt && raw[n-1]) return raw - (1 << n);
    return raw;
  endfunction

  initial begin
    int expected;
    for (int m = 0; m < 4; m++) begin
      sa = m[1];
      sb = m[0];
      for (int x = 0; x < 16; x++) begin
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y);
          #1;
          expected = value(x, 4, sa) * value(y, 4, sb);
          checks++;
          if (o4 != 8'(expected)) begin
            failures++;
            $display("FAIL 4x4 sa=%b sb=%b %0d*%0d: got %h want %h", sa, sb,
                     value(x, 4, sa), value(y, 4, sb), o4, 8'(expected));
          end
        end
      end
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y);
          #1;
          expected = value(x, 8, sa) * value(y, 8, sb);
          checks++;
          if (o8 != 16'(expected)) begin
            failures++;
            if (failures < 20)
              $display("FAIL 8x8 sa=%b sb=%b %0d*%0d: got %h want %h", sa, sb,
                       value(x, 8, sa), value(y, 8, sb), o8, 16'(expected));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
