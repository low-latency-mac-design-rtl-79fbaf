// bw_mac_pkg: constants and helpers shared by the Baugh-Wooley MAC modules.
//
// bw_correction() returns the constant that a Baugh-Wooley array adds to its
// partial products. In a two's complement operand the top bit has negative
// weight, so a partial product a_i*b_j whose weight is negative (exactly one
// of the two bits is a signed operand's top bit) is replaced by its inverse,
// using -x*2^k = (~x)*2^k - 2^k. The -2^k terms are all collected in this
// constant, taken modulo 2^(2n). For signed x signed it gives the classic
// pair of ones at columns n and 2n-1; for unsigned x unsigned it is zero.
// The signed/unsigned selection is this design's own generalisation.
package bw_mac_pkg;

  // Number format of the MAC operands.
  typedef enum logic {
    MODE_UNSIGNED = 1'b0,
    MODE_SIGNED   = 1'b1
  } num_mode_e;

  // Largest product width the helper handles (n up to 32).
  localparam int unsigned MAX_PW = 64;

  function automatic logic [MAX_PW-1:0] bw_correction(int unsigned n, bit a_signed,
                                                      bit b_signed);
    logic [MAX_PW-1:0] negsum;
    negsum = '0;
    for (int unsigned i = 0; i < n; i++) begin
      for (int unsigned j = 0; j < n; j++) begin
        if (((i == n - 1) && a_signed) != ((j == n - 1) && b_signed))
          negsum = negsum + (MAX_PW'(1) << (i + j));
      end
    end
    return (~negsum) + MAX_PW'(1);  // two's complement negation
  endfunction

endpackage
