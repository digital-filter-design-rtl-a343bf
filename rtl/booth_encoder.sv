// booth_encoder: radix-4 Booth recoding of one multiplier bit triplet.
//
// The triplet {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0) is turned into one Booth
// digit in {0, +1, +2, -1, -2}. The document names the encoder, the decoder
// and the adder as the internal elements of its Booth multiplier; here the
// recoding is built from exactly those parts. A 3-to-8 decoder turns the
// triplet into one of eight lines; the lines that mean the same digit are
// ORed and steered to the input of an 8-to-3 encoder whose index is the
// digit's {neg, two, one} code (see booth_pkg):
//   000, 111 -> 0      (encoder input 0, which drives no output)
//   001, 010 -> +1     (encoder input 1)
//   011      -> +2     (encoder input 2)
//   100      -> -2     (encoder input 6)
//   101, 110 -> -1     (encoder input 5)
// The table is the standard radix-4 Booth table; the way it is wired through
// the decoder and encoder is this design's choice. Purely combinational.
//
// Ports: triplet[2:0] (bit 2 = b[2i+1], bit 0 = b[2i-1]) -> digit.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   triplet,
  output booth_digit_t digit
);

  logic [7:0] line;  // one-hot decode of the triplet
  logic [7:0] sel;   // one-hot digit code, indexed by the code value
  logic [2:0] code;

  decoder3x8 u_dec (
    .x(triplet),
    .y(line)
  );

  always_comb begin
    sel            = '0;
    sel[CODE_ZERO] = line[0] | line[7];
    sel[CODE_POS1] = line[1] | line[2];
    sel[CODE_POS2] = line[3];
    sel[CODE_NEG2] = line[4];
    sel[CODE_NEG1] = line[5] | line[6];
  end

  encoder8x3 u_enc (
    .y(sel),
    .a(code)
  );

  assign digit = booth_digit_t'(code);

endmodule
