// tb_multiplier: starts the 16 x 16 multiplier on corner and random
// operands, checks the product against integer multiplication and checks
// that done comes exactly WIDTH + popcount(multiplier) + 1 cycles after
// the start, and that the product holds after done.
module tb_multiplier;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, st = 0;
  logic [W-1:0] mcand, mplier;
  logic [2*W-1:0] product;
  logic done;
  int checks = 0, failures = 0;

  multiplier #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .st(st), .mcand(mcand),
                               .mplier(mplier), .product(product), .done(done));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, y);
    int cycles = 0;
    @(negedge clk);
    mcand = x; mplier = y; st = 1;
    @(negedge clk);
    st = 0; mcand = W'($urandom); mplier = W'($urandom);
    cycles = 1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != W + $countones(y) + 1) begin
      failures++;
      $display("FAIL latency %0d for multiplier %h, expected %0d", cycles, y, W + $countones(y) + 1);
    end
    checks++;
    if (product !== (2*W)'(x) * (2*W)'(y)) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, product, (2*W)'(x) * (2*W)'(y));
    end
    repeat (3) @(negedge clk);
    checks++;
    if (product !== (2*W)'(x) * (2*W)'(y)) begin
      failures++;
      $display("FAIL product not held");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('1, '1);
    run(16'd0, 16'd0);
    run(16'd3, 16'd5);
    run(16'd1, 16'hFFFF);
    run(16'hFFFF, 16'd1);
    for (int i = 0; i < 300; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
