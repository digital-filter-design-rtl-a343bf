// full_adder: one-bit full adder, the leaf cell of every adder in this design.
//
// Adds two bits and a carry in. Sum and carry out follow the usual
// equations sum = a ^ b ^ cin and cout = a&b | (a^b)&cin, as the document
// gives them. Purely combinational.
//
// Ports: a, b, cin (inputs); sum, cout (outputs).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule
