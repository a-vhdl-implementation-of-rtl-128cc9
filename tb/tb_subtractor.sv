// tb_subtractor: checks the 16-bit subtractor's difference and borrow
// against integer subtraction on corner cases and random operands.
module tb_subtractor;
  localparam int W = 16;
  logic [W-1:0] a, b, d;
  logic borrow;
  int checks = 0, failures = 0;

  subtractor #(.WIDTH(W)) dut (.a(a), .b(b), .d(d), .borrow(borrow));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, tb_);
    logic [W-1:0] exp_d;
    logic exp_b;
    a = ta; b = tb_;
    #1;
    exp_d = ta - tb_;
    exp_b = (ta < tb_);
    checks++;
    if (d !== exp_d || borrow !== exp_b) begin
      failures++;
      $display("FAIL %h - %h = %h borrow %b, expected %h borrow %b", ta, tb_, d, borrow, exp_d, exp_b);
    end
  endtask

  initial begin
    check(16'd5, 16'd3);
    check(16'd3, 16'd5);
    check(16'd7, 16'd7);
    check('0, 16'd1);
    check('0, '0);
    check('1, '1);
    check('1, '0);
    for (int i = 0; i < 2000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
