// montgomery_multiplier: sequential Montgomery modular multiplier built
// around one compressor-based array multiplier.
//
// For an odd N-bit modulus M, R = 2^N and M1 = -M^-1 mod R, it returns
// Z = X*Y*R^-1 mod M for 0 <= X, Y < M. The single combinational integer
// multiplier computes, one after the other,
//   D = X*Y                  -> register file R1
//   (D mod R)*M1             -> register file R2, E = its low N bits
//   E*M                      -> register file R3
// then the 2N-bit adder forms (D + E*M)/R (exact, since D + E*M = 0 mod R)
// into an intermediate register, and the subtractor and multiplexer subtract
// M once if the value is at least M and load the output register Z.
// Dataflow and block split follow the design this RTL implements; the
// operand multiplexer in front of the multiplier's input registers, the
// cycle schedule and the handshake are this implementation's own.
//
// Timing: start is sampled while busy is low; x and y are captured then.
// m and m1 must be held stable until done. done pulses for one cycle, seven
// clock edges after the edge that samples start (eight cycles per operation
// counting the start cycle), with the result in z; z keeps its value until
// the next result. reset is synchronous and active high.
//
// Parameters: N operand width (16), COMP largest compressor of the array
// multiplier (5 for 5:2, also 4 or 3).
module montgomery_multiplier
  import mm_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned COMP = 5
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  input  logic [N-1:0] m1,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] z
);
  op_sel_e        op_sel;
  logic           op_load;
  logic [2:0]     rf_we;
  logic           t_load, z_load;

  logic [N-1:0]   opa_q, opb_q;
  logic [2*N-1:0] prod;
  logic [2*N-1:0] r1, r2, r3;
  logic [N:0]     t_sum, t_q;
  logic [N-1:0]   z_red;
  logic           subtracted;

  mm_controller u_ctrl (
    .clk, .reset, .start,
    .op_sel, .op_load, .rf_we, .t_load, .z_load, .busy, .done
  );

  // Input registers of the integer multiplier.
  always_ff @(posedge clk) begin
    if (reset) begin
      opa_q <= '0;
      opb_q <= '0;
    end else if (op_load) begin
      unique case (op_sel)
        OP_XY:   begin opa_q <= x;          opb_q <= y;  end
        OP_DM1:  begin opa_q <= r1[N-1:0];  opb_q <= m1; end
        OP_EM:   begin opa_q <= r2[N-1:0];  opb_q <= m;  end
        default: begin opa_q <= '0;         opb_q <= '0; end
      endcase
    end
  end

  compressor_array_multiplier #(.N(N), .COMP(COMP)) u_im (
    .a(opa_q), .b(opb_q), .p(prod)
  );

  register_file #(.N(N)) u_rf (
    .clk, .reset, .we(rf_we), .wdata(prod), .r1, .r2, .r3
  );

  adder_2n #(.N(N)) u_add (.d(r1), .em(r3), .t(t_sum));

  // Intermediate register after the division by R.
  always_ff @(posedge clk) begin
    if (reset)       t_q <= '0;
    else if (t_load) t_q <= t_sum;
  end

  conditional_subtractor #(.N(N)) u_sub (
    .t(t_q), .m, .z(z_red), .subtracted
  );

  // Output register Z.
  always_ff @(posedge clk) begin
    if (reset)       z <= '0;
    else if (z_load) z <= z_red;
  end

  a_mod_stable: assert property (@(posedge clk) disable iff (reset)
    busy |-> ($stable(m) && $stable(m1)))
    else $error("m and m1 must stay stable while busy");
endmodule
