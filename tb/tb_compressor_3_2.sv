// tb_compressor_3_2: exhaustive check of the 3:2 compressor. For all eight
// input combinations the outputs must satisfy x1 + x2 + cin = sum + 2*carry,
// computed here by integer addition.
module tb_compressor_3_2;
  logic x1, x2, cin, sum, carry;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.x1, .x2, .cin, .sum, .carry);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x1, x2, cin} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(x1) + int'(x2) + int'(cin)) begin
        failures++;
        $display("FAIL x=%b%b%b sum=%b carry=%b", x1, x2, cin, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
