// fir_filter: direct-form FIR filter whose tap multipliers are radix-4
// Booth multipliers.
//
// The filter computes y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k] with the three
// kinds of element the document names: delay elements (a chain of TAPS-1
// sample registers), one booth_multiplier per tap, and adders (a linear
// chain of four-bit ripple adders, adder12 instances as wide as the
// accumulator). TAPS = 16 is the document's filter length. The sample and
// coefficient width DW = 6 is this design's choice, set equal to the Booth
// multiplier's operand width in the document's worked example; the
// accumulator has 2*DW + log2(TAPS) bits rounded up to whole four-bit slices,
// so no sum of TAPS products can overflow.
//
// Interface: coef[k] is h[k], a signed DW-bit value that the user holds
// steady (a linear-phase filter uses symmetric coefficients, but any set
// works). When in_valid is high at a rising clock edge, x_in is taken as
// x[n], the delay line shifts, and on the same edge y_out is loaded with
// y[n] and out_valid goes high for one cycle: one sample per clock, one
// clock of latency. While in_valid is low the delay line and y_out hold.
// Asynchronous active-low reset clears the delay line (x[n-k] = 0 for
// samples before reset) and the output.
module fir_filter
  import booth_pkg::*;
#(
  parameter int unsigned TAPS = 16,
  parameter int unsigned DW   = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  x_in,
  input  logic signed [DW-1:0]  coef [TAPS],
  output logic                  out_valid,
  output logic signed [4*((2*DW+$clog2(TAPS)+3)/4)-1:0] y_out,
  output booth_digit_t [DW/2-1:0] digits [TAPS]   // Booth digits per tap, for observation
);

  localparam int unsigned ACC_NIB = (2 * DW + $clog2(TAPS) + 3) / 4;
  localparam int unsigned ACC_W   = 4 * ACC_NIB;

  logic signed [DW-1:0]   dly    [TAPS-1];  // dly[k] holds x[n-1-k]
  logic signed [DW-1:0]   window [TAPS];    // window[k] = x[n-k]
  logic signed [2*DW-1:0] prod   [TAPS];
  logic        [ACC_W-1:0] acc   [TAPS];

  // Delay line: current sample plus TAPS-1 registers.
  always_comb begin
    window[0] = x_in;
    for (int k = 1; k < TAPS; k++) window[k] = dly[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= window[k];
    end
  end

  // One Booth multiplier per tap.
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_multiplier #(.WIDTH(DW)) u_mul (
      .a     (coef[k]),
      .b     (window[k]),
      .p     (prod[k]),
      .digits(digits[k])
    );
  end

  // Adder chain.
  assign acc[0] = ACC_W'(prod[0]);

  for (genvar k = 1; k < TAPS; k++) begin : g_add
    logic unused_cout, unused_ovf;  // ACC_W is wide enough; never overflows
    adder12 #(.NIBBLES(ACC_NIB)) u_add (
      .a       (acc[k-1]),
      .b       (ACC_W'(prod[k])),
      .cin     (1'b0),
      .sum     (acc[k]),
      .cout    (unused_cout),
      .overflow(unused_ovf)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= acc[TAPS-1];
    end
  end

endmodule
