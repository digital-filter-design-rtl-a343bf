// tb_booth_encoder: all eight triplets against the radix-4 Booth digit
// value -2*b[2i+1] + b[2i] + b[2i-1], decoded from the {neg, two, one} code.
module tb_booth_encoder;
  import booth_pkg::*;
  logic [2:0]   triplet;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.triplet(triplet), .digit(digit));

  function automatic int digit_value(booth_digit_t d);
    int mag = d.two ? 2 : (d.one ? 1 : 0);
    if (d.one && d.two) return 99;  // illegal code
    if (mag == 0 && d.neg) return 99;
    return d.neg ? -mag : mag;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int want;
      triplet = 3'(t);
      want = -2 * int'(triplet[2]) + int'(triplet[1]) + int'(triplet[0]);
      #1;
      checks++;
      if (digit_value(digit) != want) begin
        failures++;
        $display("FAIL triplet=%b -> code=%b, want %0d", triplet, digit, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
