// register_file: the three product registers of the Montgomery multiplier.
// R1 holds D = X*Y, R2 holds (D mod R)*M1 (its low N bits are E) and R3 holds
// E*M; each is 2N bits wide. The integer multiplier's product is written into
// the register whose enable is set (we[0] -> R1, we[1] -> R2, we[2] -> R3) on
// the rising clock edge; reads are continuous. Keeping three separate
// registers, one per product, and a synchronous active-high reset that clears
// them are this design's choices.
module register_file #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [2:0]     we,
  input  logic [2*N-1:0] wdata,
  output logic [2*N-1:0] r1,
  output logic [2*N-1:0] r2,
  output logic [2*N-1:0] r3
);
  always_ff @(posedge clk) begin
    if (reset) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
    end else begin
      if (we[0]) r1 <= wdata;
      if (we[1]) r2 <= wdata;
      if (we[2]) r3 <= wdata;
    end
  end
endmodule
