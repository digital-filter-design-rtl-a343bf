// decoder3x8: 3-to-8 decoder.
//
// Output y[k] is the AND of the three inputs, each taken true or
// complemented, that is high exactly when x = k (x[2] is the most
// significant input), as in the document's decoder equations. Exactly one
// output is high for every input value. Purely combinational.
//
// Ports: x[2:0] -> y[7:0].
module decoder3x8 (
  input  logic [2:0] x,
  output logic [7:0] y
);

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      y[k] = (x[2] == k[2]) & (x[1] == k[1]) & (x[0] == k[0]);
    end
  end

endmodule
