// tb_mm_controller: checks the controller's cycle-by-cycle outputs against
// the expected eight-cycle schedule (load X,Y; write R1; load R1,M1; write
// R2; load R2,M; write R3; load T; load Z; then done), that done comes seven
// clock edges after the start edge, that start is ignored while busy, that
// operations can follow back to back and that reset returns it to idle.
module tb_mm_controller;
  import mm_pkg::*;
  logic clk = 1'b0, reset, start;
  op_sel_e op_sel;
  logic op_load, t_load, z_load, busy, done;
  logic [2:0] rf_we;
  int checks = 0, failures = 0;

  mm_controller dut (.clk, .reset, .start, .op_sel, .op_load, .rf_we,
                     .t_load, .z_load, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {op_load, op_sel, rf_we, t_load, z_load, busy} per step
  function automatic logic [8:0] expect_step(int s);
    case (s)
      0: return {1'b1, OP_XY,  3'b000, 1'b0, 1'b0, 1'b0};
      1: return {1'b0, OP_XY,  3'b001, 1'b0, 1'b0, 1'b1};
      2: return {1'b1, OP_DM1, 3'b000, 1'b0, 1'b0, 1'b1};
      3: return {1'b0, OP_XY,  3'b010, 1'b0, 1'b0, 1'b1};
      4: return {1'b1, OP_EM,  3'b000, 1'b0, 1'b0, 1'b1};
      5: return {1'b0, OP_XY,  3'b100, 1'b0, 1'b0, 1'b1};
      6: return {1'b0, OP_XY,  3'b000, 1'b1, 1'b0, 1'b1};
      7: return {1'b0, OP_XY,  3'b000, 1'b0, 1'b1, 1'b1};
      default: return '0;
    endcase
  endfunction

  task automatic run_op(input bit start_while_busy);
    int lat;
    start = 1'b1;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      // sample outputs of the cycle that ends at the next edge
      checks++;
      if ({op_load, op_sel, rf_we, t_load, z_load, busy} != expect_step(s)) begin
        failures++;
        $display("FAIL step %0d: load=%b sel=%0d we=%b t=%b z=%b busy=%b",
                 s, op_load, op_sel, rf_we, t_load, z_load, busy);
      end
      if (s > 0 && done) begin
        failures++;
        $display("FAIL done early at step %0d", s);
      end
      @(posedge clk);
      #1;
      start = start_while_busy;
    end
    start = 1'b0;
    // the cycle after RED: done
    checks++;
    if (!done || busy) begin
      failures++;
      $display("FAIL done=%b busy=%b after 8 cycles", done, busy);
    end
  endtask

  initial begin
    reset = 1'b1;
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    reset = 1'b0;
    // idle without start: nothing happens
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (busy || op_load || rf_we != 0 || done) failures++;
    end
    @(posedge clk);
    #1;
    run_op(1'b0);
    run_op(1'b1);  // start kept high while busy: schedule unchanged
    // start is high now? run_op left it low; one idle cycle
    @(posedge clk);
    #1;
    checks++;
    if (done || busy) failures++;
    // reset in the middle of an operation
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    repeat (2) @(posedge clk);
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL reset mid-operation");
    end
    run_op(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
