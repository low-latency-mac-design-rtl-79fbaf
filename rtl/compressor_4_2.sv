// compressor_4_2: full-adder based 4:2 compressor.
//
// Adds the four bits x[3:0] of one column and a horizontal carry-in cin from
// the column below, and returns them as sum (weight 1) plus carry and cout
// (both weight 2): x0 + x1 + x2 + x3 + cin = sum + 2*(carry + cout).
// Two full adders in series, as in the usual full-adder compressor: the first
// adds x0, x1, x2 and its carry leaves as cout; its sum, x3 and cin go into the
// second, which yields sum and carry. cout does not depend on cin, so a row of
// these cells has no rippling carry chain. Purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s_upper;

  full_adder u_fa_upper (
    .a    (x[0]),
    .b    (x[1]),
    .c    (x[2]),
    .sum  (s_upper),
    .carry(cout)
  );

  full_adder u_fa_lower (
    .a    (x[3]),
    .b    (s_upper),
    .c    (cin),
    .sum  (sum),
    .carry(carry)
  );
endmodule
