// parallel_adder: WIDTH-bit ripple-carry adder built from full_adder cells.
// Cell i adds a[i], b[i] and carry c[i], producing s[i] and c[i+1]; c[0] is
// the initial carry cin and c[WIDTH] leaves as cout. Purely combinational;
// the carry ripples through all WIDTH cells.
// The structure (a chain of one-bit full adders with an optional initial
// carry) follows the source; the width is a parameter, 16 by default.
module parallel_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
