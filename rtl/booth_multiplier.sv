// booth_multiplier: radix-4 (modified) Booth multiplier for signed
// two's complement operands.
//
// The multiplier b is split into WIDTH/2 overlapping triplets
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0); each is recoded by a booth_encoder
// into a digit in {0, +-1, +-2}, so a WIDTH-bit multiplier needs only WIDTH/2
// partial products instead of WIDTH. The multiplicand a is negated once by
// twos_complement_gen; one partial_product_gen per digit selects its row.
// Row i is sign-extended to 2*WIDTH bits, shifted left by 2i and added to the
// running sum by an adder12 chain of four-bit ripple adders. For the default
// WIDTH = 6 there are three rows and two adds, each exactly the 12-bit adder
// of three four-bit adders; the 6-bit operands and 12-bit product match the
// document's worked example (-11 * 27 = -297, digits +2, -1, -1).
// Rows are summed in a linear chain: the document does not say how its
// adder combines rows, so this is the simplest arrangement. Purely
// combinational; the product is exact (it always fits in 2*WIDTH bits).
//
// Ports: a[WIDTH-1:0] (multiplicand), b[WIDTH-1:0] (multiplier), both
// signed -> p[2*WIDTH-1:0] (signed product), digits (the Booth digits, for
// observation; digit i weighs 4^i).
// WIDTH must be even and at least 2.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 6
) (
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] p,
  output booth_digit_t [WIDTH/2-1:0] digits
);

  localparam int unsigned NDIG = WIDTH / 2;
  localparam int unsigned PW   = 2 * WIDTH;     // product width
  localparam int unsigned NIB  = PW / 4;        // four-bit slices per adder

  logic signed [WIDTH:0]   a_neg;
  logic        [WIDTH:0]   b_ext;               // b with b[-1] = 0 appended
  logic signed [WIDTH+1:0] pp  [NDIG];
  logic        [PW-1:0]    row [NDIG];
  logic        [PW-1:0]    acc [NDIG];

  twos_complement_gen #(.WIDTH(WIDTH)) u_neg (
    .m    (a),
    .m_neg(a_neg)
  );

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < NDIG; i++) begin : g_digit
    booth_encoder u_enc (
      .triplet(b_ext[2*i +: 3]),
      .digit  (digits[i])
    );

    partial_product_gen #(.WIDTH(WIDTH)) u_ppg (
      .m    (a),
      .m_neg(a_neg),
      .digit(digits[i]),
      .pp   (pp[i])
    );

    assign row[i] = PW'(pp[i]) << (2 * i);
  end

  assign acc[0] = row[0];

  for (genvar i = 1; i < NDIG; i++) begin : g_sum
    logic unused_cout, unused_ovf;  // the sum is exact modulo 2^PW
    adder12 #(.NIBBLES(NIB)) u_add (
      .a       (acc[i-1]),
      .b       (row[i]),
      .cin     (1'b0),
      .sum     (acc[i]),
      .cout    (unused_cout),
      .overflow(unused_ovf)
    );
  end

  assign p = acc[NDIG-1];

  initial begin
    assert (WIDTH >= 2 && WIDTH % 2 == 0)
      else $error("booth_multiplier: WIDTH must be even and >= 2");
  end

endmodule
