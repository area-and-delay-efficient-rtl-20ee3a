// adder_2n: the 2N-bit adder of the Montgomery multiplier followed by the
// division by R = 2^N. It adds the first product D = X*Y and the last
// product E*M; the 2N+1-bit sum is divisible by R by construction of E, so
// dividing by R is dropping its low N bits. The result t = (D + E*M)/R is
// N+1 bits wide (it is below 2M when X, Y < M). Combinational; the adder's
// internal structure is left to synthesis.
module adder_2n #(
  parameter int unsigned N = 16
) (
  input  logic [2*N-1:0] d,
  input  logic [2*N-1:0] em,
  output logic [N:0]     t
);
  logic [2*N:0] s;
  assign s = {1'b0, d} + {1'b0, em};
  assign t = s[2*N:N];
endmodule
