// mm_pkg: types and constant functions shared by the Montgomery multiplier.
//
// The compressor array multiplier picks, for every column of every stage, the
// smallest counter that takes all the bits arriving there: nothing (one bit or
// none), a half adder (two bits), a 3:2 compressor (three), a 4:2 compressor
// (four or five, Cin included) or a 5:2 compressor (six or seven, Cin1 and Cin2
// included). The functions below give each element's input and carry-out counts
// so that the multiplier can work out its wiring at elaboration time.
// The controller's states are also defined here.
package mm_pkg;

  // Column elements of a compressor row.
  typedef enum logic [2:0] {
    EL_WIRE = 3'd0,  // 0 or 1 input bit: passed on as the sum, no carry
    EL_HA   = 3'd1,  // half adder
    EL_C32  = 3'd2,  // 3:2 compressor (full adder)
    EL_C42  = 3'd3,  // 4:2 compressor
    EL_C52  = 3'd4   // 5:2 compressor
  } col_el_e;

  // Smallest element that takes n input bits (n <= 7).
  function automatic col_el_e pick_el(int n);
    if (n <= 1)      return EL_WIRE;
    else if (n == 2) return EL_HA;
    else if (n == 3) return EL_C32;
    else if (n <= 5) return EL_C42;
    else             return EL_C52;
  endfunction

  // Number of weight-2 outputs an element sends to the next column.
  function automatic int el_carries(col_el_e el);
    case (el)
      EL_HA, EL_C32: return 1;
      EL_C42:        return 2;
      EL_C52:        return 3;
      default:       return 0;
    endcase
  endfunction

  // Largest compressor of each kind: inputs it accepts.
  function automatic int max_inputs(int comp);
    case (comp)
      3:       return 3;
      4:       return 5;
      default: return 7;
    endcase
  endfunction

  // Operand pair loaded into the integer multiplier's input registers.
  typedef enum logic [1:0] {
    OP_XY   = 2'd0,  // X * Y
    OP_DM1  = 2'd1,  // (R1 mod R) * M1
    OP_EM   = 2'd2   // (R2 mod R) * M
  } op_sel_e;

  // Controller states, one per clock cycle of an operation.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,  // wait for start; X, Y loaded into the multiplier on start
    ST_MUL1 = 3'd1,  // R1 <= X*Y
    ST_LD2  = 3'd2,  // load (R1 mod R), M1
    ST_MUL2 = 3'd3,  // R2 <= (R1 mod R)*M1
    ST_LD3  = 3'd4,  // load (R2 mod R), M
    ST_MUL3 = 3'd5,  // R3 <= E*M
    ST_ADD  = 3'd6,  // T  <= (R1 + R3) / R
    ST_RED  = 3'd7   // Z  <= T >= M ? T - M : T
  } mm_state_e;

endpackage
