// tb_compressor_array_multiplier: checks the array multiplier in all six
// configurations the design is evaluated in, 8 and 16 bits with 3:2, 4:2 and
// 5:2 compressors, against the integer product. Each instance sees corner
// operands (0, 1, all ones, single bits) and random operands; the 8-bit
// instances are additionally checked exhaustively.
module tb_compressor_array_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [15:0] p8_3, p8_4, p8_5;
  logic [31:0] p16_3, p16_4, p16_5;

  compressor_array_multiplier #(.N(8),  .COMP(3)) u8_3  (.a(a8),  .b(b8),  .p(p8_3));
  compressor_array_multiplier #(.N(8),  .COMP(4)) u8_4  (.a(a8),  .b(b8),  .p(p8_4));
  compressor_array_multiplier #(.N(8),  .COMP(5)) u8_5  (.a(a8),  .b(b8),  .p(p8_5));
  compressor_array_multiplier #(.N(16), .COMP(3)) u16_3 (.a(a16), .b(b16), .p(p16_3));
  compressor_array_multiplier #(.N(16), .COMP(4)) u16_4 (.a(a16), .b(b16), .p(p16_4));
  compressor_array_multiplier #(.N(16), .COMP(5)) u16_5 (.a(a16), .b(b16), .p(p16_5));

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    longint unsigned ref_p;
    a16 = a;
    b16 = b;
    #1;
    ref_p = longint'(a) * longint'(b);
    checks += 3;
    if (p16_3 != 32'(ref_p) || p16_4 != 32'(ref_p) || p16_5 != 32'(ref_p)) begin
      failures++;
      $display("FAIL16 %0d*%0d=%0d got %0d %0d %0d", a, b, ref_p, p16_3, p16_4, p16_5);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 8-bit: every operand pair
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (p8_3 != 16'(i * j) || p8_4 != 16'(i * j) || p8_5 != 16'(i * j)) begin
          failures++;
          if (failures < 10)
            $display("FAIL8 %0d*%0d got %0d %0d %0d", i, j, p8_3, p8_4, p8_5);
        end
      end
    end
    // 16-bit: corners
    check16(16'h0000, 16'h0000);
    check16(16'hffff, 16'hffff);
    check16(16'hffff, 16'h0001);
    check16(16'h0001, 16'hffff);
    check16(16'hfff1, 16'hffef);
    for (int i = 0; i < 16; i++) begin
      check16(16'(1) << i, 16'hffff);
      check16(16'hffff, 16'(1) << i);
    end
    // 16-bit: random
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
