// tb_mm_workloads: runs the Montgomery multiplier in the six configurations
// the design is evaluated in: 8-bit and 16-bit operands, each with the array
// multiplier built from 3:2, 4:2 and 5:2 compressors. Every configuration
// performs directed cases (largest primes, X = Y = M-1, zero) and random
// multiplications with random odd moduli, compares each result with
// mm_ref_pkg and checks the seven-edge latency. The corner X = Y = M-1 is
// run for every odd modulus of the 8-bit instances and for the 32 largest
// odd moduli of the 16-bit instances.
module tb_mm_workloads;
  import mm_ref_pkg::*;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;

  int checks[6], failures[6];
  bit fin[6];

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    reset = 1'b0;
  end

  for (genvar g = 0; g < 6; g++) begin : g_cfg
    localparam int N    = (g < 3) ? 8 : 16;
    localparam int COMP = 3 + (g % 3);

    logic start, busy, done;
    logic [N-1:0] x, y, m, m1, z;

    montgomery_multiplier #(.N(N), .COMP(COMP)) dut (
      .clk, .reset, .start, .x, .y, .m, .m1, .busy, .done, .z
    );

    task automatic mont(input longint unsigned xv, input longint unsigned yv,
                        input longint unsigned mv);
      longint unsigned exp_z;
      int lat;
      x = N'(xv);
      y = N'(yv);
      m = N'(mv);
      m1 = N'(calc_m1(mv, N));
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      lat = 0;
      while (!done && lat < 50) begin
        @(posedge clk);
        #1;
        lat++;
      end
      exp_z = mont_ref(xv, yv, mv, N);
      checks[g]++;
      if (longint'(z) != exp_z || lat != 7) begin
        failures[g]++;
        $display("FAIL N=%0d COMP=%0d x=%0d y=%0d m=%0d z=%0d exp %0d lat %0d",
                 N, COMP, xv, yv, mv, z, exp_z, lat);
      end
    endtask

    initial begin
      longint unsigned mv, top;
      checks[g] = 0;
      failures[g] = 0;
      fin[g] = 1'b0;
      start = 1'b0;
      {x, y, m, m1} = '0;
      top = (64'd1 << N) - 1;
      @(negedge reset);
      #1;
      mont(1, 1, (N == 8) ? 251 : 65521);
      mont(0, 5, (N == 8) ? 251 : 65521);
      for (longint unsigned mo = 3; mo <= top; mo += 2) begin
        if (N == 8 || mo > top - 64) mont(mo - 1, mo - 1, mo);
      end
      for (int n = 0; n < 2000; n++) begin
        mv = longint'($urandom_range(32'(top), 3)) | 1;
        mont(longint'($urandom) % mv, longint'($urandom) % mv, mv);
      end
      fin[g] = 1'b1;
    end
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int g = 0; g < 6; g++)
      $display("config %0d: N=%0d COMP=%0d checks=%0d failures=%0d",
               g, (g < 3) ? 8 : 16, 3 + g % 3, checks[g], failures[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
