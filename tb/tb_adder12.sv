// tb_adder12: checks the 12-bit adder (three four-bit slices) against
// integer addition on corner cases (carry rippling through every slice) and
// random operands, including carry out and signed overflow.
module tb_adder12;
  logic [11:0] a, b, sum;
  logic cin, cout, overflow;
  int checks = 0, failures = 0;

  adder12 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .overflow(overflow));

  task automatic check();
    int s, ss;
    #1;
    s  = int'(a) + int'(b) + int'(cin);
    ss = int'($signed(a)) + int'($signed(b)) + int'(cin);
    checks++;
    if ({cout, sum} != 13'(s) || overflow != (ss > 2047 || ss < -2048)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b %h ovf=%b", a, b, cin, cout, sum, overflow);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 12'hFFF; b = 12'h000; cin = 1; check();
    a = 12'h0FF; b = 12'h001; cin = 0; check();
    a = 12'h7FF; b = 12'h001; cin = 0; check();
    a = 12'h800; b = 12'h800; cin = 0; check();
    a = 12'hFFF; b = 12'hFFF; cin = 1; check();
    for (int i = 0; i < 5000; i++) begin
      a = 12'($urandom); b = 12'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
