// tb_montgomery_multiplier: end-to-end test of the Montgomery multiplier at
// its default size (16-bit operands, 5:2 compressor array multiplier).
// Runs directed and random multiplications X*Y*2^-16 mod M for odd moduli
// (primes and random odd values, 0 <= X, Y < M), compares each result with
// mm_ref_pkg, and checks that done comes exactly after the
// start edge (seven clock edges). Also exercises, and counts: the final subtraction taken and
// skipped, a start request held while busy (ignored), back-to-back
// operations, a reset in the middle of an operation, and each of the three
// integer multiplications (register file writes).
module tb_montgomery_multiplier;
  import mm_ref_pkg::*;
  localparam int N = 16;
  localparam int LATENCY = 7;  // clock edges from the start edge to done

  logic clk = 1'b0, reset, start;
  logic [N-1:0] x, y, m, m1, z;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_sub = 0, n_nosub = 0, n_busy_start = 0, n_b2b = 0, n_reset_mid = 0;
  int n_mul[3] = '{0, 0, 0};

  montgomery_multiplier dut (.clk, .reset, .start, .x, .y, .m, .m1, .busy, .done, .z);

  always #5 clk = ~clk;

  // count the three integer multiplications as they are stored
  always @(posedge clk) begin
    if (!reset) begin
      for (int i = 0; i < 3; i++) if (dut.rf_we[i]) n_mul[i]++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One multiplication; keep_start holds start high during the operation.
  task automatic mont(input longint unsigned xv, input longint unsigned yv,
                      input longint unsigned mv, input bit keep_start);
    longint unsigned exp_z, tv;
    int lat;
    x     = N'(xv);
    y     = N'(yv);
    m     = N'(mv);
    m1    = N'(calc_m1(mv, N));
    start = 1'b1;
    @(posedge clk);
    #1;
    start = keep_start;
    x     = ~x;       // operands are captured at start
    y     = ~y;
    if (keep_start) n_busy_start++;
    lat = 1;
    while (!done && lat < 50) begin
      @(posedge clk);
      #1;
      lat++;
    end
    start = 1'b0;
    lat--;  // edges after the start edge up to the one that raised done
    exp_z = mont_ref(xv, yv, mv, N);
    tv    = mont_t(xv, yv, mv, N);
    if (tv >= mv) n_sub++;
    else n_nosub++;
    checks++;
    if (longint'(z) != exp_z) begin
      failures++;
      $display("FAIL x=%0d y=%0d m=%0d z=%0d exp %0d", xv, yv, mv, z, exp_z);
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    longint unsigned mv;
    longint unsigned primes[6] = '{65521, 65519, 40961, 257, 3, 5};
    reset = 1'b1;
    start = 1'b0;
    {x, y, m, m1} = '0;
    repeat (3) @(posedge clk);
    #1;
    reset = 1'b0;

    foreach (primes[i]) begin
      mont(1, 1, primes[i], 1'b0);
      mont(primes[i] - 1, primes[i] - 1, primes[i], 1'b0);
      mont(primes[i] - 1, 1, primes[i], 1'b0);
    end
    mont(0, 12345, 65521, 1'b0);
    mont(65534, 65534, 65535, 1'b0);

    // start held high while busy must not disturb the operation
    mont(1234, 5678, 65521, 1'b1);
    mont(4321, 8765, 65519, 1'b1);

    // random odd moduli, operands below the modulus
    for (int n = 0; n < 3000; n++) begin
      mv = longint'($urandom_range(65535, 3)) | 1;
      mont(longint'($urandom) % mv, longint'($urandom) % mv, mv, 1'b0);
      n_b2b++;
    end

    // reset in the middle of an operation, then a normal one
    x = 16'd999; y = 16'd777; m = 16'd65521; m1 = N'(calc_m1(65521, N));
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    checks++;
    if (busy || done || z != 0) begin
      failures++;
      $display("FAIL reset mid-operation busy=%b done=%b z=%0d", busy, done, z);
    end
    n_reset_mid++;
    mont(999, 777, 65521, 1'b0);

    $display("final subtraction taken=%0d skipped=%0d, start-while-busy=%0d, back-to-back=%0d, reset-mid=%0d",
             n_sub, n_nosub, n_busy_start, n_b2b, n_reset_mid);
    $display("multiplications: R1=%0d R2=%0d R3=%0d", n_mul[0], n_mul[1], n_mul[2]);
    checks++;
    if (n_sub == 0 || n_nosub == 0 || n_busy_start == 0 || n_b2b == 0 || n_reset_mid == 0
        || n_mul[0] == 0 || n_mul[1] == 0 || n_mul[2] == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
