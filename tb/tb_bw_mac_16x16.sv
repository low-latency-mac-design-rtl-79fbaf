// tb_bw_mac_16x16: the MAC with 16 x 16 operands in the three decomposition
// structures it can be built with:
//   A: sixteen 4 x 4 Baugh-Wooley blocks (N=16, SUB=4),
//   B: four 8 x 8 Baugh-Wooley blocks     (N=16, SUB=8),
//   C: four 8 x 8 decomposition units, each of four 4 x 4 blocks
//      (N=16, SUB=8, LEAF=4).
// All three get the same stream of random operands, formats and clears. A
// reference accumulator (36 bits: 32-bit products plus 4 guard bits) is
// kept in the testbench; every out_valid must come two cycles after its
// input and carry the expected value in all three units.
module tb_bw_mac_16x16;
  localparam int unsigned N     = 16;
  localparam int unsigned ACC_W = 36;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid, tc, clr;
  logic [N-1:0]     a, b;
  logic [ACC_W-1:0] acc_a, acc_b, acc_c;
  logic             ov_a, ov_b, ov_c;

  int checks = 0, failures = 0;
  int n_signed = 0, n_unsigned = 0, n_clear = 0;

  bw_mac #(.N(16), .SUB(4)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tc(tc), .clr(clr),
    .a(a), .b(b), .acc(acc_a), .out_valid(ov_a));
  bw_mac #(.N(16), .SUB(8)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tc(tc), .clr(clr),
    .a(a), .b(b), .acc(acc_b), .out_valid(ov_b));
  bw_mac #(.N(16), .SUB(8), .LEAF(4)) dut_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tc(tc), .clr(clr),
    .a(a), .b(b), .acc(acc_c), .out_valid(ov_c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  logic [ACC_W-1:0] exp_q[$];
  int               due_q[$];
  logic [ACC_W-1:0] model_acc = '0;
  int               cycle = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      checks++;
      if (ov_a != ov_b || ov_a != ov_c) begin
        failures++;
        $display("FAIL cycle %0d: out_valid differs between structures", cycle);
      end
      if (ov_a) begin
        logic [ACC_W-1:0] e;
        int d;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected out_valid", cycle);
        end else begin
          e = exp_q.pop_front();
          d = due_q.pop_front();
          checks += 4;
          if (d != cycle) begin
            failures++;
            $display("FAIL cycle %0d: result due at %0d", cycle, d);
          end
          if (acc_a !== e) begin failures++; $display("FAIL A acc=%h exp %h", acc_a, e); end
          if (acc_b !== e) begin failures++; $display("FAIL B acc=%h exp %h", acc_b, e); end
          if (acc_c !== e) begin failures++; $display("FAIL C acc=%h exp %h", acc_c, e); end
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; tc = 1'b1; clr = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      logic signed [2*N-1:0] sprod;
      logic [2*N-1:0]        uprod;
      in_valid = ($urandom_range(0, 7) != 0);
      if ($urandom_range(0, 31) == 0) tc = ~tc;
      clr = ($urandom_range(0, 15) == 0) || (i == 0);
      a = N'($urandom);
      b = N'($urandom);
      if (i == 1) begin a = 16'h8000; b = 16'h8000; end
      if (in_valid) begin
        sprod = $signed(a) * $signed(b);
        uprod = a * b;
        model_acc = (clr ? '0 : model_acc)
                  + (tc ? ACC_W'(signed'(sprod)) : ACC_W'(uprod));
        exp_q.push_back(model_acc);
        due_q.push_back(cycle + 2);
        if (tc) n_signed++; else n_unsigned++;
        if (clr) n_clear++;
      end
      @(posedge clk);
      cycle++;
      #1;
    end
    in_valid = 1'b0;
    repeat (4) begin
      @(posedge clk);
      cycle++;
      #1;
    end
    checks++;
    if (exp_q.size() != 0 || n_signed == 0 || n_unsigned == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL pending=%0d signed=%0d unsigned=%0d clear=%0d", exp_q.size(),
               n_signed, n_unsigned, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
