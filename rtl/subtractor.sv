// subtractor: WIDTH-bit unsigned subtraction d = a - b through the parallel
// adder. The adder gets a, the one's complement of b and an initial carry
// of 1, which together form a + (-b) in two's complement. borrow is the
// inverted carry out: it is 1 exactly when a < b. Purely combinational.
// Reusing the adder with the complemented operand follows the source; the
// carry-in of 1 and the borrow convention are this design's choices.
module subtractor #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] d,
  output logic             borrow
);

  logic cout;

  parallel_adder #(.WIDTH(WIDTH)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .s   (d),
    .cout(cout)
  );

  assign borrow = ~cout;

endmodule
