// tb_parallel_adder: checks the 16-bit ripple-carry adder on corner cases
// (full carry ripple, all ones, zero) and random operands, with and
// without an initial carry, against the integer sum.
module tb_parallel_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  parallel_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", ta, tb_, tc, {cout, s}, exp);
    end
  endtask

  initial begin
    check('1, 16'd1, 1'b0);     // carry ripples through every cell
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(16'h5555, 16'hAAAA, 1'b0);
    check(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 2000; i++)
      check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
