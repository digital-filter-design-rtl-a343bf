// encoder8x3: 8-to-3 encoder.
//
// Each output bit is the OR of the four inputs whose index has that bit
// set: a[2] = y7|y6|y5|y4, a[1] = y7|y6|y3|y2, a[0] = y7|y5|y3|y1, as the
// document's encoder equations give. With exactly one input high the output
// is that input's index. y0 takes part in no equation, which is what an
// encoder with an all-zero code for input 0 needs, so a lint tool's notice
// that y[0] is unused is expected. Purely combinational.
//
// Ports: y[7:0] -> a[2:0].
module encoder8x3 (
  input  logic [7:0] y,
  output logic [2:0] a
);

  always_comb begin
    a[2] = y[7] | y[6] | y[5] | y[4];
    a[1] = y[7] | y[6] | y[3] | y[2];
    a[0] = y[7] | y[5] | y[3] | y[1];
  end

endmodule
