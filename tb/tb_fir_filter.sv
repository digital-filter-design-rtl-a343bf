// tb_fir_filter: drives the 16-tap filter with random 6-bit coefficients and
// samples, with random gaps in in_valid, and compares every output with a
// direct-form convolution computed here. Checks the one-clock latency
// (out_valid exactly one edge after each accepted sample), that y_out holds
// while no sample arrives, and an impulse response that must reproduce the
// coefficients in order.
module tb_fir_filter;
  localparam int TAPS = 16, DW = 6, YW = 4 * ((2 * DW + $clog2(TAPS) + 3) / 4);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x_in;
  logic signed [DW-1:0] coef [TAPS];
  logic out_valid;
  logic signed [YW-1:0] y_out;
  booth_pkg::booth_digit_t [DW/2-1:0] digits [TAPS];
  int checks = 0, failures = 0;
  int hist [TAPS];        // model delay line, hist[k] = x[n-k]
  int expect_y;
  logic expect_valid = 0;

  fir_filter #(.TAPS(TAPS), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .coef(coef),
    .out_valid(out_valid), .y_out(y_out), .digits(digits));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one cycle: a sample if v, else an idle cycle; then check.
  task automatic cycle(bit v, int x);
    @(negedge clk);
    in_valid = v;
    x_in = DW'(x);
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      expect_y = 0;
      for (int k = 0; k < TAPS; k++) expect_y += int'(coef[k]) * hist[k];
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%b want %b", out_valid, v);
    end
    checks++;
    if (int'(y_out) != expect_y) begin
      failures++;
      $display("FAIL y=%0d want %0d", y_out, expect_y);
    end
  endtask

  initial begin
    foreach (hist[k]) hist[k] = 0;
    expect_y = 0;
    x_in = '0;
    // impulse response with coefficients 1..16 mixed in sign
    foreach (coef[k]) coef[k] = DW'((k % 2 != 0) ? -(k + 1) : (k + 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycle(1, 1);
    for (int n = 1; n < TAPS + 2; n++) begin
      cycle(1, 0);
      checks++;
      if (n < TAPS && int'(y_out) != int'(coef[n])) failures++;
    end
    // random coefficients and data with gaps, including the extremes
    for (int r = 0; r < 20; r++) begin
      foreach (coef[k]) coef[k] = DW'($urandom);
      if (r == 0) foreach (coef[k]) coef[k] = -(2 ** (DW - 1));
      for (int n = 0; n < 100; n++) begin
        automatic int x = int'($signed(DW'($urandom)));
        if (r == 0) x = -(2 ** (DW - 1));
        cycle(($urandom % 4) != 0, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
