// adder12: 12-bit adder made of three four-bit adders in a carry chain.
//
// The operands are cut into four-bit slices; slice k adds a[4k+3:4k] and
// b[4k+3:4k] with the carry out of slice k-1 (the external carry in for
// slice 0), as in the document's 12-bit adder diagram. The document notes
// that the same four-bit adder also forms an 8-bit adder; the NIBBLES
// parameter sets the number of slices (default 3, i.e. 12 bits) so that
// other widths reuse the same structure. Purely combinational.
//
// Ports: a, b [4*NIBBLES-1:0], cin -> sum [4*NIBBLES-1:0], cout, overflow
// (two's complement overflow of the whole word).
module adder12 #(
  parameter int unsigned NIBBLES = 3
) (
  input  logic [4*NIBBLES-1:0] a,
  input  logic [4*NIBBLES-1:0] b,
  input  logic                 cin,
  output logic [4*NIBBLES-1:0] sum,
  output logic                 cout,
  output logic                 overflow
);

  logic [NIBBLES:0]   c;   // c[k] is the carry into slice k
  logic [NIBBLES-1:0] ov;  // per-slice overflow; only the top one is used

  assign c[0] = cin;

  for (genvar k = 0; k < NIBBLES; k++) begin : g_slice
    adder4 u_add4 (
      .a       (a[4*k +: 4]),
      .b       (b[4*k +: 4]),
      .cin     (c[k]),
      .sum     (sum[4*k +: 4]),
      .cout    (c[k+1]),
      .overflow(ov[k])
    );
  end

  assign cout     = c[NIBBLES];
  assign overflow = ov[NIBBLES-1];

endmodule
