// half_adder: adds two bits, a + b = sum + 2*carry.
// Used where a column of a compressor row holds only two bits, at the two ends
// of each row of the array multiplier. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
