// tb_booth_r2_multiplier: runs the sequential radix-2 Booth multiplier over
// all 1024 pairs of 5-bit signed operands, starting with the worked example
// 13 * -6 = -78. Checks each product against integer multiplication, that
// done arrives exactly WIDTH+1 clock edges after the edge taking start, that
// busy is high meanwhile, that a start during busy is ignored, and that the
// add, subtract and no-operation steps all occur.
module tb_booth_r2_multiplier;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [W-1:0] mc, mp;
  logic busy, done;
  logic signed [2*W-1:0] product;
  logic [1:0] step_op;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_nop = 0;

  booth_r2_multiplier #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(mc), .multiplier(mp),
    .busy(busy), .done(done), .product(product), .step_op(step_op));

  always #5 clk = ~clk;

  always @(posedge clk) if (busy) begin
    if (step_op == 2'b01) n_add++;
    else if (step_op == 2'b10) n_sub++;
    else n_nop++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int x, int y);
    int cycles = 0;
    @(negedge clk);
    mc = W'(x); mp = W'(y); start = 1;
    @(negedge clk);
    start = 0;
    // a start while busy must not disturb the operation
    mc = W'(~x); mp = W'(~y); start = 1;
    while (!done) begin
      @(negedge clk);
      start = 0;
      cycles++;
      checks++;
      if (!done && !busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      if (cycles > 3 * W) break;
    end
    checks++;
    if (cycles != W) begin
      failures++;
      $display("FAIL latency %0d, want %0d edges", cycles + 1, W + 1);
    end
    checks++;
    if (int'(product) != x * y) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", x, y, product);
    end
  endtask

  initial begin
    mc = '0; mp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(13, -6);
    checks++;
    if (product != 10'sd0 - 10'sd78) failures++;
    for (int x = -16; x < 16; x++)
      for (int y = -16; y < 16; y++)
        run(x, y);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_nop == 0) begin
      failures++;
      $display("FAIL step kinds add=%0d sub=%0d nop=%0d", n_add, n_sub, n_nop);
    end
    $display("steps: add=%0d sub=%0d nop=%0d", n_add, n_sub, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
