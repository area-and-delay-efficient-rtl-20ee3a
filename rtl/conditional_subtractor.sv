// conditional_subtractor: final reduction of the Montgomery multiplier, the
// N-bit subtractor and the multiplexer behind it. The subtractor forms
// t - m with one extra bit; when it does not borrow (t >= m) the multiplexer
// passes the difference, otherwise t itself. For t < 2m the result is below
// m. Using t >= m rather than t > m as the condition makes the result fully
// reduced; for a prime modulus and 0 < X, Y < M the two never differ.
// Combinational. subtracted reports which input the multiplexer chose.
module conditional_subtractor #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]   t,
  input  logic [N-1:0] m,
  output logic [N-1:0] z,
  output logic         subtracted
);
  logic [N+1:0] diff;
  assign diff       = {1'b0, t} - {2'b00, m};
  assign subtracted = ~diff[N+1];
  assign z          = subtracted ? diff[N-1:0] : t[N-1:0];
endmodule
