// tb_adder4: exhaustive check of the four-bit ripple adder (all a, b, cin)
// against integer addition, including carry out and signed overflow.
module tb_adder4;
  logic [3:0] a, b, sum;
  logic cin, cout, overflow;
  int checks = 0, failures = 0;

  adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .overflow(overflow));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int s, ss;
      {cin, a, b} = 9'(v);
      #1;
      s  = int'(a) + int'(b) + int'(cin);
      ss = int'($signed(a)) + int'($signed(b)) + int'(cin);
      checks++;
      if ({cout, sum} != 5'(s) || overflow != (ss > 7 || ss < -8)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> %b %h ovf=%b", a, b, cin, cout, sum, overflow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
