// tb_adder_2n: checks (d + em) / 2^N, N = 16, against 64-bit integer
// arithmetic for corner and random 32-bit operands, including sums that
// overflow 2N bits (the result's top bit).
module tb_adder_2n;
  localparam int N = 16;
  logic [2*N-1:0] d, em;
  logic [N:0] t;
  int checks = 0, failures = 0;

  adder_2n dut (.d, .em, .t);

  task automatic check(input logic [31:0] dv, input logic [31:0] ev);
    longint unsigned r;
    d  = dv;
    em = ev;
    #1;
    r = (longint'(dv) + longint'(ev)) >> N;
    checks++;
    if (t != 17'(r)) begin
      failures++;
      $display("FAIL %h + %h : %h exp %h", dv, ev, t, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 32'h1);
    check(32'h8000_0000, 32'h8000_0000);
    for (int n = 0; n < 5000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
