// bw_decomp_mult: N x N multiplier built by decomposition into SUB x SUB
// Baugh-Wooley multipliers (default 8 x 8 from four 4 x 4 blocks).
//
// Each operand is cut into K = N/SUB slices. Every pair of slices (a_p, b_q)
// is multiplied by its own sub-multiplier, all in parallel, and the
// sub-product is shifted to bit SUB*(p+q). a_signed / b_signed say whether
// each operand is two's complement; only the top slice of a signed operand is
// signed, lower slices are unsigned, so a sub-product is signed when either of
// its slices is; it is then sign-extended to OUT_W bits, otherwise
// zero-extended.
//
// The sub-multiplier is a baugh_wooley block when SUB == LEAF (the default).
// When SUB > LEAF it is itself a bw_decomp_mult of SUB x SUB built from
// LEAF x LEAF blocks, e.g. 16 x 16 from four 8 x 8 decomposition units
// (N=16, SUB=8, LEAF=4). A nested unit hands over its product in carry-save
// form at the full OUT_W width, so both of its vectors enter the tree and no
// adder sits between the levels.
//
// The aligned sub-products are summed by a tree of 4:2 compressor rows
// (compressor_row_4_2). With the default four sub-products that is a single
// row; larger configurations use a balanced tree in which every level halves
// the number of operands (16 operands: 4 + 2 + 1 rows in 3 levels). The
// exact shape of the tree is this design's choice.
// No carry-propagate
// adder is used here: the product leaves in carry-save form, ps + pc equals
// a*b modulo 2^OUT_W, so the final addition can be merged with an
// accumulator. OUT_W may exceed 2N; the extension is then already in the pair.
//
// Timing: purely combinational.
module bw_decomp_mult #(
  parameter int unsigned N     = 8,
  parameter int unsigned SUB   = 4,
  parameter int unsigned LEAF  = SUB,
  parameter int unsigned OUT_W = 2 * N
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  logic             a_signed,
  input  logic             b_signed,
  output logic [OUT_W-1:0] ps,
  output logic [OUT_W-1:0] pc
);
  localparam int unsigned K     = N / SUB;      // slices per operand
  localparam bit          NEST  = (SUB > LEAF);  // nested decomposition
  localparam int unsigned M     = (NEST ? 2 : 1) * K * K;  // tree operands
  localparam int unsigned NOPS  = (M < 2) ? 2 : M;  // operands incl. padding
  localparam int unsigned PW    = 2 * SUB;

  // Operands left after l levels of the compressor tree.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c = M;
    for (int unsigned i = 0; i < l; i++) begin
      if (c > 2) c = 2 * (c / 4) + ((c % 4 == 3) ? 2 : c % 4);
    end
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c = M;
    int unsigned l = 0;
    while (c > 2) begin
      c = 2 * (c / 4) + ((c % 4 == 3) ? 2 : c % 4);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Aligned, extended sub-products; entries past M are zero padding.
  logic [OUT_W-1:0] ops [NOPS];

  for (genvar p = 0; p < K; p++) begin : g_a
    for (genvar q = 0; q < K; q++) begin : g_b
      localparam int unsigned IDX = (NEST ? 2 : 1) * (p * K + q);
      localparam int unsigned SH  = SUB * (p + q);
      logic sa, sb;

      assign sa = a_signed && (p == K - 1);
      assign sb = b_signed && (q == K - 1);

      if (NEST) begin : g_nest
        logic [OUT_W-1:0] sub_s, sub_c;
        bw_decomp_mult #(.N(SUB), .SUB(LEAF), .LEAF(LEAF), .OUT_W(OUT_W)) u_sub (
          .a       (a[p*SUB +: SUB]),
          .b       (b[q*SUB +: SUB]),
          .a_signed(sa),
          .b_signed(sb),
          .ps      (sub_s),
          .pc      (sub_c)
        );
        // Shifting both vectors keeps their sum equal to the shifted product.
        assign ops[IDX]     = OUT_W'(sub_s << SH);
        assign ops[IDX + 1] = OUT_W'(sub_c << SH);
      end else begin : g_leaf
        logic [PW-1:0]           sp;
        logic [OUT_W + PW - 1:0] ext;
        baugh_wooley #(.N(SUB)) u_bw (
          .a       (a[p*SUB +: SUB]),
          .b       (b[q*SUB +: SUB]),
          .a_signed(sa),
          .b_signed(sb),
          .o       (sp)
        );
        // Sign- or zero-extend the sub-product, then shift it into place.
        assign ext = {{OUT_W{(sa | sb) & sp[PW-1]}}, sp};
        assign ops[IDX] = OUT_W'(ext << SH);
      end
    end
  end

  for (genvar z = M; z < NOPS; z++) begin : g_pad
    assign ops[z] = '0;
  end

  // Balanced tree of 4:2 compressor rows. Each level turns every group of
  // four operands into two; a group of three gets a zero fourth input, and
  // one or two left-over operands pass straight down.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned C    = count_at(l);
    localparam int unsigned G    = C / 4;
    localparam int unsigned REM  = C % 4;
    localparam int unsigned NEXT = count_at(l + 1);
    logic [OUT_W-1:0] lv_in  [NOPS];
    logic [OUT_W-1:0] lv_out [NOPS];

    if (l == 0) begin : g_first
      assign lv_in = ops;
    end else begin : g_next
      assign lv_in = g_level[l-1].lv_out;
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      compressor_row_4_2 #(.W(OUT_W)) u_row (
        .x0   (lv_in[4*g]),
        .x1   (lv_in[4*g+1]),
        .x2   (lv_in[4*g+2]),
        .x3   (lv_in[4*g+3]),
        .sum  (lv_out[2*g]),
        .carry(lv_out[2*g+1])
      );
    end
    if (REM == 3) begin : g_three
      compressor_row_4_2 #(.W(OUT_W)) u_row (
        .x0   (lv_in[4*G]),
        .x1   (lv_in[4*G+1]),
        .x2   (lv_in[4*G+2]),
        .x3   ('0),
        .sum  (lv_out[2*G]),
        .carry(lv_out[2*G+1])
      );
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_r
        assign lv_out[2*G+r] = lv_in[4*G+r];
      end
    end
    for (genvar z = NEXT; z < NOPS; z++) begin : g_unused
      assign lv_out[z] = '0;
    end
  end

  if (LEVELS == 0) begin : g_no_tree
    assign ps = ops[0];
    assign pc = ops[1];
  end else begin : g_tree
    assign ps = g_level[LEVELS-1].lv_out[0];
    assign pc = g_level[LEVELS-1].lv_out[1];
  end
endmodule
