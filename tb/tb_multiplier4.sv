// tb_multiplier4: the multiplier at WIDTH = 4, the size of the ten-state
// controller (S0..S9) and the 9-bit accumulator of the original 4-bit
// add-and-shift example. All 256 operand pairs are multiplied; each product
// and each latency (4 + popcount(multiplier) + 1 cycles, so 5 to 9) is
// checked, and the controller is checked to visit ten distinct states.
module tb_multiplier4;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, st = 0;
  logic [W-1:0] mcand, mplier;
  logic [2*W-1:0] product;
  logic done;
  int checks = 0, failures = 0;
  bit seen [16];

  multiplier #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .st(st), .mcand(mcand),
                               .mplier(mplier), .product(product), .done(done));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) seen[dut.u_ctl.state] = 1'b1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_states;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        int cycles;
        @(negedge clk);
        mcand = W'(x); mplier = W'(y); st = 1;
        @(negedge clk);
        st = 0; cycles = 1;
        while (!done && cycles < 20) begin @(negedge clk); cycles++; end
        checks++;
        if (product !== 8'(x * y) || cycles != W + $countones(W'(y)) + 1) begin
          failures++;
          $display("FAIL %0d*%0d = %0d after %0d cycles", x, y, product, cycles);
        end
      end
    end
    n_states = 0;
    foreach (seen[i]) if (seen[i]) n_states++;
    checks++;
    if (n_states != 10) begin
      failures++;
      $display("FAIL controller visited %0d states, expected 10", n_states);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
