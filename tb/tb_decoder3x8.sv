// tb_decoder3x8: every input value must raise exactly its own output line;
// includes the example x = 101 giving 0010_0000.
module tb_decoder3x8;
  logic [2:0] x;
  logic [7:0] y;
  int checks = 0, failures = 0;

  decoder3x8 dut (.x(x), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      x = 3'(k);
      #1;
      checks++;
      if (y != 8'(1 << k)) begin
        failures++;
        $display("FAIL x=%0d -> y=%b", x, y);
      end
    end
    x = 3'b101; #1;
    checks++;
    if (y != 8'b0010_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
