// tb_logic_unit: runs every code through the logical block with random
// operands and compares result, carry and valid with a reference computed
// here from the operation's definition.
module tb_logic_unit;
  import alu_pkg::*;
  localparam int W = 16;
  alu_op_e op;
  logic [W-1:0] a, b, y;
  logic cout, valid;
  int checks = 0, failures = 0;

  logic_unit #(.WIDTH(W)) dut (.op(op), .a(a), .b(b), .y(y), .cout(cout), .valid(valid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [4:0] code, input logic [W-1:0] ta, tb_);
    logic [W-1:0] ey;
    logic ec, ev;
    op = alu_op_e'(code); a = ta; b = tb_;
    #1;
    ey = '0; ec = 1'b0; ev = 1'b1;
    case (code)
      5'd0:  ey = ~ta;
      5'd1:  ey = ta & tb_;
      5'd2:  ey = ta | tb_;
      5'd3:  ey = ~(ta & tb_);
      5'd4:  ey = ~(ta | tb_);
      5'd5:  ey = ta ^ tb_;
      5'd6:  ey = ~(ta ^ tb_);
      5'd7:  begin ey = ta << 1; ec = ta[W-1]; end
      5'd8:  begin ey = ta >> 1; ec = ta[0]; end
      5'd9:  begin ey = (ta << 1) | (ta >> (W-1)); ec = ta[W-1]; end
      5'd10: begin ey = (ta >> 1) | (ta << (W-1)); ec = ta[0]; end
      default: ev = 1'b0;
    endcase
    checks++;
    if (valid !== ev || (ev && (y !== ey || cout !== ec))) begin
      failures++;
      $display("FAIL code=%b a=%h b=%h: y=%h c=%b v=%b, expected y=%h c=%b v=%b",
               code, ta, tb_, y, cout, valid, ey, ec, ev);
    end
  endtask

  initial begin
    for (int c = 0; c < 32; c++) begin
      check(5'(c), 16'h8001, 16'h0FF0);
      check(5'(c), 16'h7FFE, 16'hFFFF);
      for (int i = 0; i < 100; i++) check(5'(c), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
