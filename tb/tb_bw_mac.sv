// tb_bw_mac: end-to-end self-checking test of the two-cycle MAC at its
// default size (8 x 8 operands, 20-bit accumulator).
//
// A reference model in the testbench keeps its own accumulator, updated with
// the exact product of each accepted operand pair (signed or unsigned per
// tc), and is compared with acc whenever out_valid is high. The test also
// checks the latency: out_valid must rise exactly two cycles after each
// in_valid cycle and at no other time.
//
// Stimulus: directed dot products (a 4-tap signed FIR output, an unsigned
// sum, the extreme operands -128*-128 and 255*255) followed by a random
// stream with idle cycles, back-to-back operations, clears and format
// switches. Each mechanism is counted, and one that never happened counts as
// a failure: signed and unsigned products, clears, accumulation without a
// clear, back-to-back inputs, idle cycles, format switches and accumulator
// wrap-around.
module tb_bw_mac;
  import bw_mac_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned ACC_W = 20;
  localparam int unsigned LAT   = 2;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid, tc, clr;
  logic [N-1:0]     a, b;
  logic [ACC_W-1:0] acc;
  logic             out_valid;

  int checks = 0, failures = 0;
  int n_signed = 0, n_unsigned = 0, n_clear = 0, n_accum = 0, n_b2b = 0;
  int n_idle = 0, n_switch = 0, n_wrap = 0;

  bw_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tc(tc), .clr(clr),
    .a(a), .b(b), .acc(acc), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  // Expected accumulator values, in issue order, and the cycle each is due.
  logic [ACC_W-1:0] exp_q[$];
  int               due_q[$];
  longint           model_acc = 0;
  int               cycle = 0;
  logic             prev_valid = 1'b0;
  num_mode_e        prev_mode = MODE_SIGNED;

  function automatic longint value(logic [N-1:0] raw, bit signed_fmt);
    if (signed_fmt) return longint'($signed(raw));
    return longint'(raw);
  endfunction

  // Issue one operation (or an idle cycle) on the next clock edge.
  task automatic issue(bit valid, bit fmt, bit clear, logic [N-1:0] x, logic [N-1:0] y);
    longint prod, prior;
    in_valid = valid; tc = fmt; clr = clear; a = x; b = y;
    if (valid) begin
      prod   = value(x, fmt) * value(y, fmt);
      prior = clear ? 0 : model_acc;
      model_acc = prior + prod;
      if (fmt) n_signed++; else n_unsigned++;
      if (clear) n_clear++; else n_accum++;
      if (prev_valid) n_b2b++;
      if (num_mode_e'(fmt) != prev_mode) n_switch++;
      prev_mode = num_mode_e'(fmt);
      // Wrap: the exact sum leaves the accumulator's range for this format.
      if (fmt ? (model_acc >= (longint'(1) << (ACC_W - 1)) ||
                 model_acc < -(longint'(1) << (ACC_W - 1)))
              : (model_acc >= (longint'(1) << ACC_W))) begin
        n_wrap++;
        model_acc = fmt ? longint'($signed(ACC_W'(model_acc))) : longint'(ACC_W'(model_acc));
      end
      exp_q.push_back(ACC_W'(model_acc));
      due_q.push_back(cycle + LAT);
    end else begin
      n_idle++;
    end
    prev_valid = valid;
    @(posedge clk);
    cycle++;
    #1;
  endtask

  // Output monitor, sampled just after each edge.
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: out_valid with no operation outstanding", cycle);
        end else begin
          logic [ACC_W-1:0] e;
          int d;
          e = exp_q.pop_front();
          d = due_q.pop_front();
          if (acc !== e) begin
            failures++;
            $display("FAIL cycle %0d: acc=%h expected %h", cycle, acc, e);
          end
          checks++;
          if (d != cycle) begin
            failures++;
            $display("FAIL cycle %0d: result due at cycle %0d (latency)", cycle, d);
          end
        end
      end else if (due_q.size() != 0 && due_q[0] <= cycle) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: result due at %0d did not appear", cycle, due_q[0]);
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  // 4-tap signed FIR output: x = {10, -20, 30, -40}, h = {3, -5, 7, -9}.
  byte fir_x[4] = '{10, -20, 30, -40};
  byte fir_h[4] = '{3, -5, 7, -9};

  initial begin

    rst_n = 1'b0; in_valid = 1'b0; tc = 1'b1; clr = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    for (int i = 0; i < 4; i++)
      issue(1'b1, 1'b1, i == 0, N'(fir_x[i]), N'(fir_h[i]));
    issue(1'b0, 1'b1, 1'b0, '0, '0);
    issue(1'b0, 1'b1, 1'b0, '0, '0);
    checks++;
    if ($signed(acc) != 20'sd700) begin  // 30 + 100 + 210 + 360
      failures++;
      $display("FAIL FIR dot product: acc=%0d expected 700", $signed(acc));
    end

    // Extreme signed and unsigned operands.
    issue(1'b1, 1'b1, 1'b1, 8'h80, 8'h80);          // -128 * -128 = 16384
    issue(1'b1, 1'b0, 1'b1, 8'hff, 8'hff);          // 255 * 255 = 65025
    issue(1'b1, 1'b0, 1'b0, 8'hff, 8'hff);          // + 65025
    issue(1'b1, 1'b1, 1'b1, 8'h80, 8'h7f);          // -128 * 127
    issue(1'b0, 1'b1, 1'b0, '0, '0);
    issue(1'b0, 1'b1, 1'b0, '0, '0);
    checks++;
    if ($signed(acc) != -20'sd16256) begin
      failures++;
      $display("FAIL -128*127: acc=%0d", $signed(acc));
    end

    // Unsigned run long enough to wrap the 20-bit accumulator.
    for (int i = 0; i < 20; i++)
      issue(1'b1, 1'b0, i == 0, 8'hff, 8'hff);

    // Random stream.
    for (int i = 0; i < 20000; i++) begin
      bit v, f, c;
      v = ($urandom_range(0, 9) != 0);
      f = ($urandom_range(0, 15) == 0) ? ~tc : tc;
      c = ($urandom_range(0, 11) == 0);
      issue(v, f, c, N'($urandom), N'($urandom));
    end
    repeat (4) issue(1'b0, tc, 1'b0, '0, '0);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end

    $display("mechanisms: signed=%0d unsigned=%0d clear=%0d accumulate=%0d back_to_back=%0d idle=%0d format_switch=%0d wrap=%0d",
             n_signed, n_unsigned, n_clear, n_accum, n_b2b, n_idle, n_switch, n_wrap);
    if (n_signed == 0 || n_unsigned == 0 || n_clear == 0 || n_accum == 0 ||
        n_b2b == 0 || n_idle == 0 || n_switch == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
