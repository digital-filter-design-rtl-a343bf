// adder4: four-bit ripple-carry adder built from four one-bit full adders.
//
// Bit 0 takes the external carry in; the carry out of each bit feeds the
// next, and the carry out of bit 3 is the adder's carry out, as in the
// document's four-bit adder diagram. `overflow` flags a two's complement
// overflow (carry into bit 3 differs from carry out of bit 3); the signal
// name appears in the document's adder simulation, its equation is this
// design's choice. Purely combinational.
//
// Ports: a[3:0], b[3:0], cin -> sum[3:0], cout, overflow.
module adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       overflow
);

  logic [4:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout     = c[4];
  assign overflow = c[4] ^ c[3];

endmodule
