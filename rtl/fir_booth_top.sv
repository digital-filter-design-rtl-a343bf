// fir_booth_top: the complete design, a 16-tap FIR filter built on radix-4
// Booth multipliers, with the sequential radix-2 Booth multiplier beside it.
//
// The filter (fir_filter) is the main datapath: its 16 tap multipliers are
// modified Booth multipliers, each made of Booth encoders (3-to-8 decoder
// plus 8-to-3 encoder), a two's complement generator, partial product
// generators and 12-bit adders of four-bit ripple adders. The radix-2
// Booth multiplier of the document's flowchart has no place in the
// filter's one-sample-per-clock datapath, so it stands on its own with its
// own ports; it shares only the clock and reset. All ports are those of the
// two units, passed straight through; see fir_filter and
// booth_r2_multiplier for timing.
module fir_booth_top
  import booth_pkg::*;
#(
  parameter int unsigned TAPS     = 16,
  parameter int unsigned DW       = 6,
  parameter int unsigned R2_WIDTH = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // FIR filter
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  x_in,
  input  logic signed [DW-1:0]  coef [TAPS],
  output logic                  out_valid,
  output logic signed [4*((2*DW+$clog2(TAPS)+3)/4)-1:0] y_out,
  output booth_digit_t [DW/2-1:0] digits [TAPS],
  // radix-2 Booth multiplier
  input  logic                        r2_start,
  input  logic signed [R2_WIDTH-1:0]  r2_multiplicand,
  input  logic signed [R2_WIDTH-1:0]  r2_multiplier,
  output logic                        r2_busy,
  output logic                        r2_done,
  output logic signed [2*R2_WIDTH-1:0] r2_product,
  output logic [1:0]                  r2_step_op
);

  fir_filter #(.TAPS(TAPS), .DW(DW)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .coef     (coef),
    .out_valid(out_valid),
    .y_out    (y_out),
    .digits   (digits)
  );

  booth_r2_multiplier #(.WIDTH(R2_WIDTH)) u_r2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (r2_start),
    .multiplicand(r2_multiplicand),
    .multiplier  (r2_multiplier),
    .busy        (r2_busy),
    .done        (r2_done),
    .product     (r2_product),
    .step_op     (r2_step_op)
  );

endmodule
