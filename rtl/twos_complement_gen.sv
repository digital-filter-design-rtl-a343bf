// twos_complement_gen: negates the multiplicand for the partial product
// generator.
//
// The signed WIDTH-bit multiplicand m is sign-extended by one bit and its
// two's complement (invert all bits, add one) is returned on WIDTH+1 bits,
// so that -(-2^(WIDTH-1)) = +2^(WIDTH-1) is representable. The document
// shows this block in its Booth multiplier diagram by name only; the extra
// bit is this design's choice. Purely combinational.
//
// Ports: m[WIDTH-1:0] -> m_neg[WIDTH:0].
module twos_complement_gen #(
  parameter int unsigned WIDTH = 6
) (
  input  logic signed [WIDTH-1:0] m,
  output logic signed [WIDTH:0]   m_neg
);

  logic signed [WIDTH:0] m_ext;

  always_comb begin
    m_ext = (WIDTH+1)'(m);  // sign extension (m is signed)
    m_neg = ~m_ext + 1'b1;
  end

endmodule
