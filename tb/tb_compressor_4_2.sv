// tb_compressor_4_2: exhaustive self-checking test of the 4:2 compressor.
// All 32 input combinations are applied; for each, the weighted output
// sum + 2*(carry + cout) must equal the number of ones among x[3:0] and cin,
// and cout must be the same for cin = 0 and cin = 1 (no carry ripple).
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_c0;
    int   ones;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        x   = 4'(v);
        cin = 1'(c);
        #1;
        ones = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + c;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != ones) begin
          failures++;
          $display("FAIL x=%b cin=%b -> sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
        end
        if (c == 0) cout_c0 = cout;
        else begin
          checks++;
          if (cout !== cout_c0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
