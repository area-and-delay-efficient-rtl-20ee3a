// compressor_array_multiplier: combinational N x N unsigned array multiplier
// whose partial products are summed by rows of 3:2, 4:2 and 5:2 compressors.
//
// Partial product row i is a[i] AND b, shifted left by i (bit a[i]&b[j] lands
// in column i+j). The rows are summed in NS stages. A stage is one row of
// column elements running from column 0 to column 2N-1; every carry an
// element produces goes to the element of the next column in the same stage,
// so each stage leaves exactly one sum bit per column: the running sum. The
// first stage adds the first COMP-1 partial product rows; every later stage
// adds the running sum and the next COMP-2 rows. With COMP = 3 this is the
// classic ripple array multiplier (one new row per stage, N-1 stages); with
// COMP = 4 two new rows per stage; with COMP = 5 three.
//
// In each column the smallest element that takes all arriving bits is used
// (see mm_pkg::pick_el): a wire, a half adder, a 3:2, a 4:2 or a 5:2
// compressor. Inside a stage the rows thus start and end with half adders and
// 3:2/4:2 compressors and use the largest compressor in the middle. Row bits
// go to the X inputs first, then the carries of the previous column in the
// order Carry, Cout1, Cout2, so that a full 5:2 column receives
// Carry -> X5, Cout1 -> Cin1, Cout2 -> Cin2 (and a full 4:2 column
// Carry -> X4, Cout -> Cin): only the Carry outputs ripple along a row.
// Carries out of column 2N-1 are dropped; they are always zero because every
// running sum is smaller than 2^(2N).
//
// Stage counts: N=8: 7/4/3 and N=16: 15/8/5 stages for COMP=3/4/5.
// The mixing of element kinds along a row and the sum/carry naming follow the
// 8-bit 5:2 example this design is based on; the number of rows per stage is
// this design's own choice, the largest a single compressor per column can
// take while leaving one sum bit per column.
//
// Interface: a, b (N bits) in, p = a*b (2N bits) out, no clock.
// Parameters: N operand width, COMP largest compressor (3, 4 or 5).
module compressor_array_multiplier
  import mm_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned COMP = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int W     = 2 * N;
  localparam int NSLOT = int'(COMP) - 1;                        // row inputs per stage
  localparam int R0    = (NSLOT < int'(N)) ? NSLOT : int'(N);   // PP rows in stage 0
  localparam int K     = int'(COMP) - 2;                        // new PP rows per later stage
  localparam int NS    = (int'(N) > R0) ? 1 + (int'(N) - R0 + K - 1) / K : 1;

  if (COMP < 3 || COMP > 5) begin : g_bad_comp
    $error("COMP must be 3, 4 or 5");
  end

  // Partial product row feeding row input r of stage s:
  // >= 0 a PP row, -1 the running sum of stage s-1, -2 nothing.
  function automatic int slot_row(int s, int r);
    int row;
    if (s == 0)      row = r;
    else if (r == 0) return -1;
    else             row = R0 + (s - 1) * K + (r - 1);
    return (row < int'(N)) ? row : -2;
  endfunction

  // Last PP row summed once stage s is done.
  function automatic int last_row(int s);
    int l;
    l = R0 - 1 + s * K;
    return (l < int'(N)) ? l : int'(N) - 1;
  endfunction

  // Whether row input r of stage s can be nonzero in column k.
  function automatic bit slot_valid(int s, int r, int k);
    int row;
    row = slot_row(s, r);
    if (row == -1) return k < int'(N) + last_row(s - 1) + 1;
    if (row == -2) return 1'b0;
    return (k >= row) && (k <= row + int'(N) - 1);
  endfunction

  function automatic int col_height(int s, int k);
    int h;
    h = 0;
    for (int r = 0; r < NSLOT; r++) if (slot_valid(s, r, k)) h++;
    return h;
  endfunction

  // Carries arriving in column k of stage s from column k-1.
  function automatic int col_cin(int s, int k);
    int c;
    c = 0;
    for (int j = 0; j < k; j++) c = el_carries(pick_el(col_height(s, j) + c));
    return c;
  endfunction

  logic [W-1:0] pp   [N];

  for (genvar i = 0; i < int'(N); i++) begin : g_pp
    assign pp[i] = {{N{1'b0}}, b & {N{a[i]}}} << i;
  end

  for (genvar s = 0; s < NS; s++) begin : g_st
    logic [W-1:0] slot [NSLOT];  // this stage's row inputs
    logic [W-1:0] rsum;          // this stage's sum row
    for (genvar r = 0; r < NSLOT; r++) begin : g_slot
      localparam int ROW = slot_row(s, r);
      if (ROW == -1) begin : g_run
        assign slot[r] = g_st[s-1].rsum;
      end else if (ROW >= 0) begin : g_row
        assign slot[r] = pp[ROW];
      end else begin : g_none
        assign slot[r] = '0;
      end
    end

    for (genvar k = 0; k < W; k++) begin : g_col
      localparam int      H  = col_height(s, k);
      localparam int      CI = col_cin(s, k);
      localparam col_el_e EL = pick_el(H + CI);

      if (H + CI > max_inputs(int'(COMP))) begin : g_overflow
        $error("column has more bits than the compressor takes");
      end

      logic [2:0] cprev;
      logic [6:0] vin;
      logic       sb;
      logic [2:0] cb;

      if (k > 0) begin : g_cprev
        assign cprev = g_col[k-1].cb;
      end else begin : g_cprev0
        assign cprev = '0;
      end

      // Gather the column's bits: row bits first, then incoming carries.
      always_comb begin
        int idx;
        vin = '0;
        idx = 0;
        for (int r = 0; r < NSLOT; r++) begin
          if (slot_valid(s, r, k)) begin
            vin[idx] = slot[r][k];
            idx++;
          end
        end
        for (int c = 0; c < 3; c++) begin
          if (c < CI && H + c < 7) vin[H+c] = cprev[c];
        end
      end

      case (EL)
        EL_HA: begin : g_ha
          half_adder u_ha (.a(vin[0]), .b(vin[1]), .sum(sb), .carry(cb[0]));
          assign cb[2:1] = '0;
        end
        EL_C32: begin : g_c32
          compressor_3_2 u_c32 (.x1(vin[0]), .x2(vin[1]), .cin(vin[2]), .sum(sb), .carry(cb[0]));
          assign cb[2:1] = '0;
        end
        EL_C42: begin : g_c42
          compressor_4_2 u_c42 (.x(vin[3:0]), .cin(vin[4]), .sum(sb), .carry(cb[0]), .cout(cb[1]));
          assign cb[2] = 1'b0;
        end
        EL_C52: begin : g_c52
          compressor_5_2 u_c52 (.x(vin[4:0]), .cin1(vin[5]), .cin2(vin[6]),
                                .sum(sb), .carry(cb[0]), .cout1(cb[1]), .cout2(cb[2]));
        end
        default: begin : g_wire
          assign sb = vin[0];
          assign cb = '0;
        end
      endcase

      assign rsum[k] = sb;
    end
  end

  assign p = g_st[NS-1].rsum;

endmodule
