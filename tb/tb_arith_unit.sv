// tb_arith_unit: checks ADD, SUB, INC, DEC and CMP of the arithmetic block
// (result and carry/borrow) against integer arithmetic on corner and random
// operands, checks that logical codes are not claimed (valid low), and runs
// multiplications through start/done with the expected latency.
module tb_arith_unit;
  import alu_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  alu_op_e op;
  logic [W-1:0] a, b;
  logic [2*W-1:0] y;
  logic cout, done, valid;
  int checks = 0, failures = 0;

  arith_unit #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .op(op), .a(a), .b(b), .start(start),
                               .y(y), .cout(cout), .done(done), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_comb(input alu_op_e o, input logic [W-1:0] x, z);
    logic [2*W-1:0] ey;
    logic ec, ev;
    op = o; a = x; b = z;
    #1;
    ev = 1'b1; ey = '0; ec = 1'b0;
    case (o)
      OP_ADD: begin ey = (2*W)'({1'b0, x} + {1'b0, z}) & {{(W-1){1'b0}}, {(W+1){1'b1}}};
                    ec = ey[W]; ey[W] = 1'b0; end
      OP_INC: begin ey = (2*W)'(x) + 1; ec = ey[W]; ey[W] = 1'b0; end
      OP_SUB: begin ey = (2*W)'(W'(x - z)); ec = (x < z); end
      OP_DEC: begin ey = (2*W)'(W'(x - 1)); ec = (x == 0); end
      OP_CMP: begin ey = (2*W)'({x > z, x == z, x < z}); ec = (x < z); end
      default: ev = 1'b0;
    endcase
    checks++;
    if (valid !== ev || (ev && (y !== ey || cout !== ec))) begin
      failures++;
      $display("FAIL %s a=%h b=%h: y=%h c=%b v=%b, expected y=%h c=%b v=%b",
               o.name(), x, z, y, cout, valid, ey, ec, ev);
    end
  endtask

  task automatic run_mul(input logic [W-1:0] x, z);
    int cycles;
    @(negedge clk);
    op = OP_MUL; a = x; b = z; start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != W + $countones(z) + 1 || y !== (2*W)'(x) * (2*W)'(z) || cout !== 1'b0) begin
      failures++;
      $display("FAIL MUL %h*%h = %h after %0d cycles", x, z, y, cycles);
    end
  endtask

  initial begin
    op = OP_ADD; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_comb(OP_ADD, '1, 16'd1);
    check_comb(OP_INC, '1, 16'd7);
    check_comb(OP_DEC, '0, 16'd7);
    check_comb(OP_SUB, 16'd2, 16'd3);
    check_comb(OP_CMP, 16'd9, 16'd9);
    check_comb(OP_CMP, 16'd10, 16'd9);
    check_comb(OP_CMP, 16'd8, 16'd9);
    check_comb(OP_AND, 16'd8, 16'd9);
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] x = W'($urandom), z = W'($urandom);
      check_comb(OP_ADD, x, z);
      check_comb(OP_SUB, x, z);
      check_comb(OP_INC, x, z);
      check_comb(OP_DEC, x, z);
      check_comb(OP_CMP, x, (i % 4 == 0) ? x : z);
    end
    run_mul(16'd300, 16'd200);
    run_mul('1, '1);
    for (int i = 0; i < 50; i++) run_mul(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
