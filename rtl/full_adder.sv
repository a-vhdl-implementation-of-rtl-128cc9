// full_adder: one-bit full adder, the building block of the ripple-carry
// parallel adder.
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The source uses a one-bit full adder as the structural component; the
// gate equations are the standard ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);

endmodule
