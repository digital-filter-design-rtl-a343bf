// partial_product_gen: one partial product row of the radix-4 Booth
// multiplier.
//
// From the multiplicand m, its two's complement m_neg (from
// twos_complement_gen) and one Booth digit it selects 0, +m, -m, +2m or -2m.
// Doubling is a one-bit left shift. The row is WIDTH+2 bits wide, signed,
// enough for +-2 * -2^(WIDTH-1). The selection rule follows the modified
// Booth algorithm the document describes; the row width and the use of the
// precomputed negative are this design's choices. Purely combinational.
//
// Ports: m[WIDTH-1:0], m_neg[WIDTH:0], digit -> pp[WIDTH+1:0].
module partial_product_gen
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 6
) (
  input  logic signed [WIDTH-1:0] m,
  input  logic signed [WIDTH:0]   m_neg,
  input  booth_digit_t            digit,
  output logic signed [WIDTH+1:0] pp
);

  logic signed [WIDTH+1:0] base;  // +m or -m, sign-extended to the row

  always_comb begin
    base = digit.neg ? (WIDTH+2)'(m_neg) : (WIDTH+2)'(m);
    if (digit.one)      pp = base;
    else if (digit.two) pp = base <<< 1;
    else                pp = '0;
  end

endmodule
