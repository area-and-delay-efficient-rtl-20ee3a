// mm_controller: the multiplier controller. A state machine that
// steps through one Montgomery multiplication in eight clock cycles:
//
//   IDLE  start seen: load X, Y into the integer multiplier's input registers
//   MUL1  write the product X*Y into R1
//   LD2   load (R1 mod R) and M1
//   MUL2  write the product into R2 (its low half is E)
//   LD3   load (R2 mod R) and M
//   MUL3  write E*M into R3
//   ADD   load the intermediate register with (R1 + R3)/R
//   RED   load the output register with the reduced result
//
// done is a one-cycle pulse in the cycle after RED (seven clock edges after the
// edge that samples start), when the output register
// holds the result; busy is high from MUL1 to RED. start is ignored while
// busy. The order of operations (three multiplications, each product stored,
// operand registers reloaded before each one, then add and reduce) is the
// design's; the cycle-by-cycle schedule, the handshake and the synchronous
// active-high reset are this implementation's choices.
module mm_controller
  import mm_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      start,
  output op_sel_e   op_sel,
  output logic      op_load,
  output logic [2:0] rf_we,
  output logic      t_load,
  output logic      z_load,
  output logic      busy,
  output logic      done
);
  mm_state_e state, state_n;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= ST_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      done  <= (state == ST_RED);
    end
  end

  always_comb begin
    state_n = state;
    op_sel  = OP_XY;
    op_load = 1'b0;
    rf_we   = 3'b000;
    t_load  = 1'b0;
    z_load  = 1'b0;
    unique case (state)
      ST_IDLE: if (start) begin
        op_load = 1'b1;
        op_sel  = OP_XY;
        state_n = ST_MUL1;
      end
      ST_MUL1: begin rf_we = 3'b001; state_n = ST_LD2; end
      ST_LD2:  begin op_load = 1'b1; op_sel = OP_DM1; state_n = ST_MUL2; end
      ST_MUL2: begin rf_we = 3'b010; state_n = ST_LD3; end
      ST_LD3:  begin op_load = 1'b1; op_sel = OP_EM; state_n = ST_MUL3; end
      ST_MUL3: begin rf_we = 3'b100; state_n = ST_ADD; end
      ST_ADD:  begin t_load = 1'b1; state_n = ST_RED; end
      ST_RED:  begin z_load = 1'b1; state_n = ST_IDLE; end
      default: state_n = ST_IDLE;
    endcase
  end

  assign busy = (state != ST_IDLE);

  // Exactly one register-file write per cycle at most.
  a_rf_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(rf_we));
endmodule
