// bw_mac: two-cycle multiply-accumulate unit built on a Baugh-Wooley
// decomposition multiplier and 4:2 compressors (top of the design).
//
// Every cycle with in_valid set, the unit takes operands a and b, a format bit
// tc (1: two's complement, 0: unsigned) and clr, and adds a*b to the
// accumulator (clr = 1 makes a*b the new accumulator value instead).
//
// Cycle 1 (multiply): bw_decomp_mult forms a*b with four parallel 4 x 4
//   Baugh-Wooley blocks and one 4:2 compressor row, at the accumulator width,
//   and leaves it in carry-save form (ps, pc). The pair is registered.
// Cycle 2 (accumulate): a second 4:2 compressor row merges ps, pc and the
//   accumulator (forced to zero when clr was set) into one carry-save pair,
//   and a single carry-propagate adder gives the new accumulator. The
//   multiplier's own final adder is thus merged into the accumulate adder.
//
// Timing: a new operand pair can be given every cycle. The product of
// operands presented in cycle t is in acc after the second rising edge
// (t+2), with out_valid high for that cycle. Back-to-back inputs are
// accumulated without stalls because the accumulator feeds back inside
// cycle 2.
//
// The accumulator is ACC_W = 2N + GUARD bits and wraps on overflow; in signed
// mode it reads as two's complement, in unsigned mode as unsigned. Mixing
// formats within one sum is allowed but only meaningful while the values fit.
// The guard bits, clr, the valid handshake and the asynchronous active-low
// reset are this design's choices; the two-cycle split, the compressors,
// the merged final addition and the decomposition multiplier follow the
// architecture it implements. The assertion at the end uses rst_n as its
// disable condition, which lint reports as rst_n being used both
// synchronously and asynchronously; the flip-flops themselves use it only as
// an asynchronous reset.
module bw_mac
  import bw_mac_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned SUB   = 4,
  parameter int unsigned LEAF  = SUB,
  parameter int unsigned GUARD = 4,
  parameter int unsigned ACC_W = 2 * N + GUARD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             tc,
  input  logic             clr,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ACC_W-1:0] acc,
  output logic             out_valid
);
  // ---------------- cycle 1: multiply into carry-save form ----------------
  logic [ACC_W-1:0] ps, pc;

  bw_decomp_mult #(.N(N), .SUB(SUB), .LEAF(LEAF), .OUT_W(ACC_W)) u_mult (
    .a(a),
    .b(b),
    .a_signed(tc),
    .b_signed(tc),
    .ps(ps),
    .pc(pc)
  );

  typedef struct packed {
    logic             valid;
    logic             clr;
    logic [ACC_W-1:0] ps;
    logic [ACC_W-1:0] pc;
  } stage1_t;

  stage1_t s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
    end else begin
      s1.valid <= in_valid;
      if (in_valid) begin
        s1.clr <= clr;
        s1.ps  <= ps;
        s1.pc  <= pc;
      end
    end
  end

  // ---------------- cycle 2: compress with accumulator, then add -----------
  logic [ACC_W-1:0] acc_in, cs_sum, cs_carry, acc_next;

  assign acc_in = s1.clr ? '0 : acc;

  compressor_row_4_2 #(.W(ACC_W)) u_acc_row (
    .x0   (s1.ps),
    .x1   (s1.pc),
    .x2   (acc_in),
    .x3   ('0),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  assign acc_next = cs_sum + cs_carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= s1.valid;
      if (s1.valid) acc <= acc_next;
    end
  end

`ifndef SYNTHESIS
  // A result can only appear one cycle after a valid multiply stage.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> $past(s1.valid))
    else $error("bw_mac: out_valid without a product in stage 1");
`endif
endmodule
