// tb_conditional_subtractor: for N = 16, drives random moduli m and values
// t in [0, 2m) and checks z = t mod m and the subtracted flag against
// integer arithmetic; covers t = 0, t = m - 1, t = m, t = 2m - 1 and t
// values with bit N set. Counts both multiplexer choices.
module tb_conditional_subtractor;
  localparam int N = 16;
  logic [N:0] t;
  logic [N-1:0] m, z;
  logic subtracted;
  int checks = 0, failures = 0, n_sub = 0, n_pass = 0;

  conditional_subtractor dut (.t, .m, .z, .subtracted);

  task automatic check(input int tv, input int mv);
    int ez;
    t = 17'(tv);
    m = 16'(mv);
    #1;
    ez = (tv >= mv) ? tv - mv : tv;
    checks++;
    if (int'(z) != ez || subtracted != (tv >= mv)) begin
      failures++;
      $display("FAIL t=%0d m=%0d z=%0d sub=%b", tv, mv, z, subtracted);
    end
    if (tv >= mv) n_sub++;
    else n_pass++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv;
    for (int n = 0; n < 3000; n++) begin
      mv = int'($urandom_range(65535, 1)) | 1;
      check(0, mv);
      check(mv - 1, mv);
      check(mv, mv);
      check(2 * mv - 1, mv);
      check(int'($urandom_range(2 * mv - 1, 0)), mv);
    end
    checks++;
    if (n_sub == 0 || n_pass == 0) failures++;
    $display("subtracted=%0d passed=%0d", n_sub, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
