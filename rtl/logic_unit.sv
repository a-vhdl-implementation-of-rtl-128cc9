// logic_unit: the ALU's logical block, written as dataflow.
// It computes NOT, AND, OR, NAND, NOR, XOR, XNOR of the operands and the
// one-bit left/right shifts (zero fill) and rotations of operand a.
// cout carries the bit that leaves a in a shift or rotation (a[WIDTH-1] to
// the left, a[0] to the right) and is 0 otherwise. valid is high when op is
// one of the eleven logical codes; y and cout are 0 for any other code.
// Purely combinational.
// The operation list and codes follow the source; the shift distance of one
// bit, the zero fill and the use of the carry pin are this design's choices.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             cout,
  output logic             valid
);

  always_comb begin
    y     = '0;
    cout  = 1'b0;
    valid = 1'b1;
    unique case (op)
      OP_NOT:  y = ~a;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_NAND: y = ~(a & b);
      OP_NOR:  y = ~(a | b);
      OP_XOR:  y = a ^ b;
      OP_XNOR: y = ~(a ^ b);
      OP_SHL:  begin y = {a[WIDTH-2:0], 1'b0};       cout = a[WIDTH-1]; end
      OP_SHR:  begin y = {1'b0, a[WIDTH-1:1]};       cout = a[0];       end
      OP_ROL:  begin y = {a[WIDTH-2:0], a[WIDTH-1]}; cout = a[WIDTH-1]; end
      OP_ROR:  begin y = {a[0], a[WIDTH-1:1]};       cout = a[0];       end
      default: valid = 1'b0;
    endcase
  end

endmodule
