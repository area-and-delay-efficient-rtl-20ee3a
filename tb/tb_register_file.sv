// tb_register_file: writes random 32-bit products into R1, R2, R3 under
// random one-hot (and idle) write enables for N = 16 and compares all three
// read ports with a model of the three registers every cycle; also checks
// that reset clears them.
module tb_register_file;
  localparam int N = 16;
  logic clk = 1'b0, reset;
  logic [2:0] we;
  logic [2*N-1:0] wdata, r1, r2, r3;
  logic [2*N-1:0] m1, m2, m3;
  int checks = 0, failures = 0;

  register_file dut (.clk, .reset, .we, .wdata, .r1, .r2, .r3);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    we    = '0;
    wdata = '1;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (r1 != 0 || r2 != 0 || r3 != 0) begin
      failures++;
      $display("FAIL reset");
    end
    reset = 1'b0;
    {m1, m2, m3} = '0;
    for (int n = 0; n < 1000; n++) begin
      case ($urandom_range(3))
        0: we = 3'b001;
        1: we = 3'b010;
        2: we = 3'b100;
        default: we = 3'b000;
      endcase
      wdata = $urandom;
      @(posedge clk);
      if (we[0]) m1 = wdata;
      if (we[1]) m2 = wdata;
      if (we[2]) m3 = wdata;
      @(negedge clk);
      checks++;
      if (r1 != m1 || r2 != m2 || r3 != m3) begin
        failures++;
        $display("FAIL n=%0d r=%h %h %h exp %h %h %h", n, r1, r2, r3, m1, m2, m3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
