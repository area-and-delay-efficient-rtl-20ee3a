// compressor_4_2: 4:2 compressor made of two cascaded 3:2 compressors.
// x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout).
// The first full adder adds x[0..2] and gives cout, which therefore does not
// depend on cin; its sum is added to x[3] and cin by the second full adder,
// giving sum and carry. This is the structure of the design; input order
// x[0]=X1 .. x[3]=X4. Purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;
  compressor_3_2 u_fa1 (.x1(x[0]), .x2(x[1]), .cin(x[2]), .sum(s1),  .carry(cout));
  compressor_3_2 u_fa2 (.x1(s1),   .x2(x[3]), .cin(cin),  .sum(sum), .carry(carry));
endmodule
