// compressor_3_2: 3:2 compressor, the full adder of the array multiplier.
// x1 + x2 + cin = sum + 2*carry. Built as two XOR gates and a multiplexer:
// the first XOR forms the propagate signal x1^x2, the second XOR adds cin to
// give the sum, and the multiplexer, selected by the propagate signal, passes
// cin when exactly one of x1, x2 is set and x1 otherwise (then x1 == x2 is the
// carry). The XOR-XOR-MUX structure is the one the design is based on; which
// of x1/x2 feeds the multiplexer is an arbitrary choice (both are equal when
// it is selected). Purely combinational.
module compressor_3_2 (
  input  logic x1,
  input  logic x2,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic p;
  assign p     = x1 ^ x2;
  assign sum   = p ^ cin;
  assign carry = p ? cin : x1;
endmodule
