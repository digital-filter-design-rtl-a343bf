// tb_partial_product_gen: every 6-bit multiplicand with each of the five
// Booth digits; the row must equal digit * multiplicand.
module tb_partial_product_gen;
  import booth_pkg::*;
  logic signed [5:0] m;
  logic signed [6:0] m_neg;
  booth_digit_t      digit;
  logic signed [7:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.WIDTH(6)) dut (.m(m), .m_neg(m_neg), .digit(digit), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dval [5] = '{0, 1, 2, -1, -2};
    booth_digit_t dcode [5] = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110};
    for (int v = -32; v < 32; v++) begin
      for (int d = 0; d < 5; d++) begin
        m = 6'(v);
        m_neg = 7'(-v);
        digit = dcode[d];
        #1;
        checks++;
        if (int'(pp) != dval[d] * v) begin
          failures++;
          $display("FAIL m=%0d digit=%0d -> %0d", v, dval[d], pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
