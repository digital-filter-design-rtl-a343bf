// tb_twos_complement_gen: every 6-bit signed multiplicand, and random 9-bit
// ones, must come out negated on one more bit.
module tb_twos_complement_gen;
  logic signed [5:0] m6;
  logic signed [6:0] n6;
  logic signed [8:0] m9;
  logic signed [9:0] n9;
  int checks = 0, failures = 0;

  twos_complement_gen #(.WIDTH(6)) dut6 (.m(m6), .m_neg(n6));
  twos_complement_gen #(.WIDTH(9)) dut9 (.m(m9), .m_neg(n9));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      m6 = 6'(v);
      #1;
      checks++;
      if (int'(n6) != -v) begin
        failures++;
        $display("FAIL m=%0d -> %0d", v, n6);
      end
    end
    for (int i = 0; i < 200; i++) begin
      m9 = 9'($urandom);
      #1;
      checks++;
      if (int'(n9) != -int'(m9)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
