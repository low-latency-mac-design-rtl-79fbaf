// compressor_row_4_2: a W-bit row of 4:2 compressors.
//
// Reduces four W-bit operands to a carry-save pair: sum + carry equals
// x0 + x1 + x2 + x3 modulo 2^W. Bit i uses one compressor_4_2 whose cin is the
// cout of bit i-1 (the horizontal carry); bit 0 gets cin = 0. The carry vector
// is returned already shifted to its weight (bit 0 is 0), and the carries out
// of bit W-1 are dropped, so the row works modulo 2^W. Since a compressor's
// cout does not depend on its cin, the delay of the row does not grow with W.
// Purely combinational. The width W and the modulo behaviour are this
// design's choice; because the top column's carries are dropped on purpose,
// lint reports hcarry[W] and vcarry[W-1] as unused.
module compressor_row_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W:0]   hcarry;  // hcarry[i] is the horizontal carry into bit i
  logic [W-1:0] vcarry;  // vertical carry of bit i, weight 2^(i+1)

  assign hcarry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_4_2 u_cmp (
      .x    ({x3[i], x2[i], x1[i], x0[i]}),
      .cin  (hcarry[i]),
      .sum  (sum[i]),
      .carry(vcarry[i]),
      .cout (hcarry[i+1])
    );
  end

  if (W > 1) begin : g_shift
    assign carry = {vcarry[W-2:0], 1'b0};
  end else begin : g_noshift
    assign carry = 1'b0;
  end
endmodule
