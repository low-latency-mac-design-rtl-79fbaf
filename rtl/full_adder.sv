// full_adder: one-bit full adder, the cell from which the 4:2 compressors and
// the Baugh-Wooley array are built. sum = a ^ b ^ c, carry = majority(a, b, c).
// Purely combinational. Its gate-level form is left to synthesis.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end
endmodule
