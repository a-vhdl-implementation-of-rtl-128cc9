// arith_unit: the ALU's arithmetic block, built structurally from a
// parallel adder, a subtractor and the sequential multiplier.
//   ADD  y = a + b         cout = carry out
//   INC  y = a + 1         cout = carry out  (adder with b = 0, carry in 1)
//   SUB  y = a - b         cout = borrow
//   DEC  y = a - 1         cout = borrow     (subtractor with b = 1)
//   CMP  y = {gt, eq, lt}  cout = borrow     (unsigned a against b)
//   MUL  y = product       cout = 0
// Everything but MUL is combinational. MUL is sequential: start, while op
// is MUL, starts the multiplier with multiplicand a and multiplier b; done
// pulses when y holds the 32-bit product, which stays until the next start.
// valid is high for the six arithmetic codes; y and cout are 0 otherwise.
// The adder-based units and the add-and-shift multiplier follow the source;
// how INC, DEC and CMP use them, the comparison's result format and the
// carry-pin use are this design's choices.
module arith_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  alu_op_e            op,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               start,
  output logic [2*WIDTH-1:0] y,
  output logic               cout,
  output logic               done,
  output logic               valid
);

  logic [WIDTH-1:0]   add_b, add_s, sub_b, sub_d;
  logic               add_c, add_cin, sub_borrow;
  logic [2*WIDTH-1:0] product;
  logic               lt, eq, gt;

  // INC reuses the adder: a + 0 with an initial carry of 1.
  assign add_b   = (op == OP_INC) ? '0 : b;
  assign add_cin = (op == OP_INC);

  parallel_adder #(.WIDTH(WIDTH)) u_add (
    .a   (a),
    .b   (add_b),
    .cin (add_cin),
    .s   (add_s),
    .cout(add_c)
  );

  // DEC reuses the subtractor: a - 1.
  assign sub_b = (op == OP_DEC) ? WIDTH'(1) : b;

  subtractor #(.WIDTH(WIDTH)) u_sub (
    .a     (a),
    .b     (sub_b),
    .d     (sub_d),
    .borrow(sub_borrow)
  );

  multiplier #(.WIDTH(WIDTH)) u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .st     (start && (op == OP_MUL)),
    .mcand  (a),
    .mplier (b),
    .product(product),
    .done   (done)
  );

  assign lt = sub_borrow;
  assign eq = (sub_d == '0);
  assign gt = ~lt & ~eq;

  always_comb begin
    y     = '0;
    cout  = 1'b0;
    valid = 1'b1;
    unique case (op)
      OP_ADD, OP_INC: begin y = {{WIDTH{1'b0}}, add_s}; cout = add_c;      end
      OP_SUB, OP_DEC: begin y = {{WIDTH{1'b0}}, sub_d}; cout = sub_borrow; end
      OP_CMP:         begin y = {{(2*WIDTH-3){1'b0}}, gt, eq, lt}; cout = sub_borrow; end
      OP_MUL:         y = product;
      default:        valid = 1'b0;
    endcase
  end

endmodule
