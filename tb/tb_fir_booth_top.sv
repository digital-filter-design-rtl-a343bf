// tb_fir_booth_top: end-to-end test of the whole design at its default
// sizes (16 taps, 6-bit samples and coefficients, 5-bit radix-2 multiplier).
// A symmetric (linear-phase) low-pass-like coefficient set, then random
// ones, filter a stream of random samples with idle cycles; each output is
// compared with a convolution computed here. At the same time the radix-2
// Booth multiplier runs a stream of random products, each checked for value
// and for its WIDTH+1 edge latency. Counts how often each mechanism
// occurred and counts a failure for any that never did: every radix-4 Booth
// digit (0, +1, +2, -1, -2), filter idle cycles (delay line holds), the
// full-scale accumulation, the radix-2 add, subtract and no-operation
// steps, and a start ignored while the radix-2 unit is busy.
module tb_fir_booth_top;
  import booth_pkg::*;
  localparam int TAPS = 16, DW = 6, R2W = 5, YW = 4 * ((2 * DW + $clog2(TAPS) + 3) / 4);
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [DW-1:0] x_in;
  logic signed [DW-1:0] coef [TAPS];
  logic out_valid;
  logic signed [YW-1:0] y_out;
  booth_digit_t [DW/2-1:0] digits [TAPS];
  logic r2_start = 0;
  logic signed [R2W-1:0] r2_mc, r2_mp;
  logic r2_busy, r2_done;
  logic signed [2*R2W-1:0] r2_product;
  logic [1:0] r2_step_op;

  int checks = 0, failures = 0;
  int hist [TAPS];
  int expect_y = 0;
  int n_digit [5];          // 0, +1, +2, -1, -2
  int n_idle = 0, n_fullscale = 0;
  int n_add = 0, n_sub = 0, n_nop = 0, n_busy_start = 0, n_r2 = 0;
  bit fir_done = 0;

  fir_booth_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x_in(x_in), .coef(coef), .out_valid(out_valid),
    .y_out(y_out), .digits(digits),
    .r2_start(r2_start), .r2_multiplicand(r2_mc), .r2_multiplier(r2_mp),
    .r2_busy(r2_busy), .r2_done(r2_done), .r2_product(r2_product),
    .r2_step_op(r2_step_op));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      for (int k = 0; k < TAPS; k++)
        for (int i = 0; i < DW / 2; i++)
          case (digits[k][i])
            3'b000: n_digit[0]++;
            3'b001: n_digit[1]++;
            3'b010: n_digit[2]++;
            3'b101: n_digit[3]++;
            3'b110: n_digit[4]++;
            default: begin
              failures++;
              $display("FAIL illegal Booth code %b", digits[k][i]);
            end
          endcase
    end else n_idle++;
    if (r2_busy) begin
      if (r2_step_op == 2'b01) n_add++;
      else if (r2_step_op == 2'b10) n_sub++;
      else n_nop++;
      if (r2_start) n_busy_start++;
    end
  end

  // ---------------- FIR stream ----------------
  task automatic fir_cycle(bit v, int x);
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
    if (out_valid !== v || int'(y_out) != expect_y) begin
      failures++;
      $display("FAIL fir valid=%b y=%0d want %b %0d", out_valid, y_out, v, expect_y);
    end
    if (v && expect_y == TAPS * (2 ** (2 * DW - 2))) n_fullscale++;
  endtask

  initial begin : fir_stream
    automatic int sym [TAPS / 2] = '{-1, -2, 0, 3, 7, 12, 17, 20};
    foreach (hist[k]) hist[k] = 0;
    x_in = '0;
    for (int k = 0; k < TAPS / 2; k++) begin
      coef[k] = DW'(sym[k]);
      coef[TAPS - 1 - k] = DW'(sym[k]);
    end
    wait (rst_n);
    for (int n = 0; n < 300; n++) fir_cycle(($urandom % 5) != 0, int'($signed(DW'($urandom))));
    for (int r = 0; r < 5; r++) begin
      foreach (coef[k]) coef[k] = DW'($urandom);
      for (int n = 0; n < 200; n++) fir_cycle(($urandom % 5) != 0, int'($signed(DW'($urandom))));
    end
    // full scale: every coefficient and sample at the most negative value
    foreach (coef[k]) coef[k] = -(2 ** (DW - 1));
    for (int n = 0; n < TAPS + 2; n++) fir_cycle(1, -(2 ** (DW - 1)));
    fir_done = 1;
  end

  // ---------------- radix-2 stream ----------------
  initial begin : r2_stream
    r2_mc = '0; r2_mp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!fir_done || n_r2 < 200) begin
      automatic int x = int'($signed(R2W'($urandom)));
      automatic int y = int'($signed(R2W'($urandom)));
      automatic int cycles = 0;
      @(negedge clk);
      r2_mc = R2W'(x); r2_mp = R2W'(y); r2_start = 1;
      @(negedge clk);
      r2_mc = ~r2_mc; r2_mp = ~r2_mp;   // a start while busy must be ignored
      while (!r2_done && cycles < 4 * R2W) begin
        @(negedge clk);
        r2_start = 0;
        cycles++;
      end
      checks++;
      if (cycles != R2W || int'(r2_product) != x * y) begin
        failures++;
        $display("FAIL r2 %0d * %0d -> %0d after %0d", x, y, r2_product, cycles + 1);
      end
      n_r2++;
    end
    @(negedge clk);
    checks++;
    if (n_digit[0] == 0 || n_digit[1] == 0 || n_digit[2] == 0 || n_digit[3] == 0 ||
        n_digit[4] == 0 || n_idle == 0 || n_fullscale == 0 || n_add == 0 ||
        n_sub == 0 || n_nop == 0 || n_busy_start == 0) failures++;
    $display("digits 0=%0d +1=%0d +2=%0d -1=%0d -2=%0d idle=%0d fullscale=%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_idle, n_fullscale);
    $display("radix-2: products=%0d add=%0d sub=%0d nop=%0d start_while_busy=%0d",
             n_r2, n_add, n_sub, n_nop, n_busy_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
