// compressor_5_2: 5:2 compressor made of three cascaded 3:2 compressors.
// x[0]+..+x[4]+cin1+cin2 = sum + 2*(carry + cout1 + cout2).
// Full adder 1 adds x[0..2] and gives cout1; full adder 2 adds its sum, x[3]
// and cin1 and gives cout2; full adder 3 adds that sum, x[4] and cin2 and
// gives sum and carry. cout1 thus depends on none of the carry inputs and
// cout2 only on cin1, so chaining cout1->cin1 and cout2->cin2 between
// neighbouring columns does not ripple. This follows the design's structure;
// input order x[0]=X1 .. x[4]=X5. Purely combinational.
module compressor_5_2 (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, s2;
  compressor_3_2 u_fa1 (.x1(x[0]), .x2(x[1]), .cin(x[2]), .sum(s1),  .carry(cout1));
  compressor_3_2 u_fa2 (.x1(s1),   .x2(x[3]), .cin(cin1), .sum(s2),  .carry(cout2));
  compressor_3_2 u_fa3 (.x1(s2),   .x2(x[4]), .cin(cin2), .sum(sum), .carry(carry));
endmodule
