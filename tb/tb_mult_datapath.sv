// tb_mult_datapath: sequences load/ad/sh by hand (the add-and-shift
// algorithm written here in the testbench) and checks the accumulator after
// a load, after one add and after one shift, then checks that a full
// sequence leaves the integer product a*b in the product output.
module tb_mult_datapath;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0, sh = 0, ad = 0;
  logic [W-1:0] mcand, mplier;
  logic m;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  mult_datapath #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .sh(sh), .ad(ad),
                                  .mcand(mcand), .mplier(mplier), .m(m), .product(product));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input logic l, s, a_);
    @(negedge clk);
    load = l; sh = s; ad = a_;
    @(negedge clk);
    load = 0; sh = 0; ad = 0;
  endtask

  task automatic check(input string what, input logic [2*W-1:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic [W-1:0] x, y);
    mcand = x; mplier = y;
    pulse(1, 0, 0);
    mcand = ~x; mplier = ~y;   // operands may change after the load
    for (int i = 0; i < W; i++) begin
      checks++;
      if (m !== y[i]) begin failures++; $display("FAIL m at bit %0d", i); end
      if (m) pulse(0, 0, 1);
      pulse(0, 1, 0);
    end
    check($sformatf("%0d*%0d", x, y), product, (2*W)'(x) * (2*W)'(y));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single steps
    mcand = 16'hFFFF; mplier = 16'h0003;
    pulse(1, 0, 0);
    check("after load", product, 32'h0000_0003);
    pulse(0, 0, 1);
    check("after add", product, 32'hFFFF_0003);
    pulse(0, 0, 1);                               // second add sets the carry bit Cm
    check("after second add", product, 32'hFFFE_0003);
    pulse(0, 1, 0);
    check("after shift (carry enters)", product, 32'hFFFF_0001);
    run('1, '1);
    run(16'd0, 16'd1234);
    run(16'd1234, 16'd0);
    for (int i = 0; i < 200; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
