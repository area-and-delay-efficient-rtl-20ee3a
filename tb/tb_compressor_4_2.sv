// tb_compressor_4_2: exhaustive check of the 4:2 compressor over all 32 input
// combinations: x1+x2+x3+x4+cin = sum + 2*(carry+cout), and cout must not
// depend on cin (it is the carry of x1+x2+x3 alone, i.e. their majority).
module tb_compressor_4_2;
  logic [3:0] x;
  logic cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x, .cin, .sum, .carry, .cout);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, maj;
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      total = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin);
      maj   = (int'(x[0]) + int'(x[1]) + int'(x[2])) >= 2 ? 1 : 0;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
        failures++;
        $display("FAIL x=%b cin=%b sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
      end
      checks++;
      if (int'(cout) != maj) begin
        failures++;
        $display("FAIL cout x=%b cin=%b cout=%b", x, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
