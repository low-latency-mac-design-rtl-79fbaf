// baugh_wooley: N x N Baugh-Wooley array multiplier (default 4 x 4).
//
// Interface: operands a and b (N bits), product o (2N bits), as in the 4x4
// block a(3:0), b(3:0), o(7:0). Two mode bits, a_signed and b_signed, say
// whether each operand is two's complement (1) or unsigned (0). With both set
// this is the classic Baugh-Wooley signed multiplier; the mode bits are this
// design's addition, so that the same array can form the unsigned and mixed
// sub-products needed by the decomposition multiplier and the unsigned MAC.
//
// How it works: partial product p_ij = a_i & b_j sits at column i+j. A term
// whose weight is negative (exactly one of a_i, b_j is the top bit of a
// signed operand) is inverted, and a constant from bw_mac_pkg::bw_correction
// is added as an extra row; for signed x signed that constant is a one at
// column N and at column 2N-1. All partial products are then positive, so the
// N+1 rows are summed by a carry-save array of full adders (one row of cells
// per partial product row) and a final ripple-carry row of full adders.
// Results are exact in every mode: signed x signed, signed x unsigned and
// unsigned x unsigned products all fit in 2N bits.
//
// Timing: purely combinational. The carries out of column 2N-1 fall outside
// the 2N-bit product and are dropped on purpose (lint reports them unused).
module baugh_wooley
  import bw_mac_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           a_signed,
  input  logic           b_signed,
  output logic [2*N-1:0] o
);
  localparam int unsigned W = 2 * N;

  // Correction constants for the four operand formats.
  localparam logic [W-1:0] K_UU = W'(bw_correction(N, 1'b0, 1'b0));
  localparam logic [W-1:0] K_US = W'(bw_correction(N, 1'b0, 1'b1));
  localparam logic [W-1:0] K_SU = W'(bw_correction(N, 1'b1, 1'b0));
  localparam logic [W-1:0] K_SS = W'(bw_correction(N, 1'b1, 1'b1));

  // rows[j] holds the partial products of b_j, shifted to column j;
  // rows[N] is the correction constant.
  logic [W-1:0] rows [N+1];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      rows[j] = '0;
      for (int i = 0; i < N; i++) begin
        rows[j][i+j] = (a[i] & b[j])
                     ^ (((i == N - 1) && a_signed) != ((j == N - 1) && b_signed));
      end
    end
    unique case ({a_signed, b_signed})
      2'b00:   rows[N] = K_UU;
      2'b01:   rows[N] = K_US;
      2'b10:   rows[N] = K_SU;
      default: rows[N] = K_SS;
    endcase
  end

  // Carry-save array: level k holds the running sum of rows 0..k+1 as a
  // (s, c) pair; each new row is added by one row of full adders.
  logic [W-1:0] s_lv [N];
  logic [W-1:0] c_lv [N];

  assign s_lv[0] = rows[0];
  assign c_lv[0] = rows[1];

  for (genvar k = 1; k < N; k++) begin : g_level
    logic [W-1:0] fa_carry;
    for (genvar col = 0; col < W; col++) begin : g_cell
      full_adder u_fa (
        .a    (s_lv[k-1][col]),
        .b    (c_lv[k-1][col]),
        .c    (rows[k+1][col]),
        .sum  (s_lv[k][col]),
        .carry(fa_carry[col])
      );
    end
    assign c_lv[k] = {fa_carry[W-2:0], 1'b0};
  end

  // Final ripple-carry row.
  logic [W:0] rc;
  assign rc[0] = 1'b0;
  for (genvar col = 0; col < W; col++) begin : g_ripple
    full_adder u_fa (
      .a    (s_lv[N-1][col]),
      .b    (c_lv[N-1][col]),
      .c    (rc[col]),
      .sum  (o[col]),
      .carry(rc[col+1])
    );
  end
endmodule
