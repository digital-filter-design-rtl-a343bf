// tb_booth_multiplier: exhaustive check of the radix-4 Booth multiplier at
// the default 6-bit width (all 4096 operand pairs) and at 8 bits (all 65536
// pairs) against integer multiplication. Also checks the worked example
// -11 * 27 = -297, whose multiplier recodes to the digits +2, -1, -1.
module tb_booth_multiplier;
  import booth_pkg::*;
  logic signed [5:0]  a6, b6;
  logic signed [11:0] p6;
  booth_digit_t [2:0] d6;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  booth_digit_t [3:0] d8;
  int checks = 0, failures = 0;

  booth_multiplier dut6 (.a(a6), .b(b6), .p(p6), .digits(d6));
  booth_multiplier #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .p(p8), .digits(d8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = -6'sd11; b6 = 6'sd27; a8 = '0; b8 = '0;
    #1;
    checks++;
    if (p6 != -12'sd297 || p6 != 12'b1110_1101_0111) begin
      failures++;
      $display("FAIL example: %0d", p6);
    end
    checks++;
    if (d6[2] != 3'b010 || d6[1] != 3'b101 || d6[0] != 3'b101) begin
      failures++;
      $display("FAIL example digits: %b %b %b", d6[2], d6[1], d6[0]);
    end
    for (int x = -32; x < 32; x++) begin
      for (int y = -32; y < 32; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        #1;
        checks++;
        if (int'(p6) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL6 %0d * %0d -> %0d", x, y, p6);
        end
      end
    end
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (int'(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d -> %0d", x, y, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
