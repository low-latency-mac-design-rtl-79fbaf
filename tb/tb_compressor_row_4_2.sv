// tb_compressor_row_4_2: random self-checking test of a 16-bit 4:2
// compressor row. For 5000 random operand sets (plus all-ones corners) the
// carry-save result sum + carry must equal x0 + x1 + x2 + x3 modulo 2^16,
// and bit 0 of the carry vector must be 0.
module tb_compressor_row_4_2;
  localparam int unsigned W = 16;
  logic [W-1:0] x0, x1, x2, x3, sum, carry;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  compressor_row_4_2 #(.W(W)) dut (
    .x0(x0), .x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] expected;
    #1;
    expected = x0 + x1 + x2 + x3;
    checks++;
    if (W'(sum + carry) != expected || carry[0] != 1'b0) begin
      failures++;
      $display("FAIL %h+%h+%h+%h: sum=%h carry=%h", x0, x1, x2, x3, sum, carry);
    end
  endtask

  initial begin
    x0 = '1; x1 = '1; x2 = '1; x3 = '1; check();
    x0 = '0; x1 = '0; x2 = '0; x3 = '0; check();
    x0 = 16'h8000; x1 = 16'h8000; x2 = 16'h7fff; x3 = 16'h0001; check();
    for (int n = 0; n < 5000; n++) begin
      x0 = W'($urandom); x1 = W'($urandom); x2 = W'($urandom); x3 = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
