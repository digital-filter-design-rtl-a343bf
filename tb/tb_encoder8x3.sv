// tb_encoder8x3: every one-hot input must give its own index; random inputs
// are checked against the OR of the indices of the high inputs (which is
// what the three OR equations compute bit by bit).
module tb_encoder8x3;
  logic [7:0] y;
  logic [2:0] a;
  int checks = 0, failures = 0;

  encoder8x3 dut (.y(y), .a(a));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      y = 8'(1 << k);
      #1;
      checks++;
      if (a != 3'(k)) begin
        failures++;
        $display("FAIL y=%b -> a=%0d, want %0d", y, a, k);
      end
    end
    for (int v = 0; v < 256; v++) begin
      logic [2:0] want;
      y = 8'(v);
      want = '0;
      for (int k = 0; k < 8; k++) if (y[k]) want |= 3'(k);
      #1;
      checks++;
      if (a != want) begin
        failures++;
        $display("FAIL y=%b -> a=%0d, want %0d", y, a, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
