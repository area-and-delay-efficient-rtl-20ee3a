// tb_compressor_5_2: exhaustive check of the 5:2 compressor over all 128
// input combinations: x1+..+x5+cin1+cin2 = sum + 2*(carry+cout1+cout2);
// cout1 must be the majority of x1..x3 (independent of both carry inputs)
// and cout2 must not depend on cin2.
module tb_compressor_5_2;
  logic [4:0] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x, .cin1, .cin2, .sum, .carry, .cout1, .cout2);

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, maj;
    logic c2_a;
    for (int v = 0; v < 128; v++) begin
      {cin2, cin1, x} = 7'(v);
      #1;
      total = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(x[4])
            + int'(cin1) + int'(cin2);
      maj   = (int'(x[0]) + int'(x[1]) + int'(x[2])) >= 2 ? 1 : 0;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != total) begin
        failures++;
        $display("FAIL x=%b cin=%b%b sum=%b carry=%b cout=%b%b",
                 x, cin1, cin2, sum, carry, cout1, cout2);
      end
      checks++;
      if (int'(cout1) != maj) begin
        failures++;
        $display("FAIL cout1 x=%b", x);
      end
      // cout2 with cin2 flipped must be unchanged
      c2_a = cout2;
      cin2 = ~cin2;
      #1;
      checks++;
      if (cout2 != c2_a) begin
        failures++;
        $display("FAIL cout2 depends on cin2, x=%b cin1=%b", x, cin1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
