// alu16: flexible 16-bit arithmetic and logical unit (top level).
// Two WIDTH-bit operands inp1 and inp2 and five selection lines sel choose
// one of 17 instructions (codes in alu_pkg): seven bitwise operations, four
// one-bit shifts and rotations of inp1, addition, subtraction, increment,
// decrement, multiplication and comparison. The logical block and the
// arithmetic block both see the operands at all times; sel picks which
// one drives the 2*WIDTH-bit result and the carry/borrow bit.
// Timing: every instruction except multiplication is combinational. A
// multiplication starts when start is high on a rising clk edge while sel
// is MULTIPLICATION; done is high for one cycle, 17 to 33 cycles later for
// WIDTH = 16 (WIDTH + popcount(inp2) + 1), and result then holds
// inp1 * inp2 for as long as sel stays MULTIPLICATION and no new start
// comes. rst_n is an asynchronous active-low reset of the multiplier.
// Unused codes (10001 to 11111) give result 0 and carry 0.
// The instruction set, the pin widths and the split into a structural
// arithmetic block and a dataflow logical block follow the source; the
// clock, reset, start and done pins, the zero extension of 16-bit results,
// the comparison result format and the carry for shifts are this design's
// choices.
module alu16
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   inp1,
  input  logic [WIDTH-1:0]   inp2,
  input  logic [4:0]         sel,
  input  logic               start,
  output logic [2*WIDTH-1:0] result,
  output logic               carry,
  output logic               done
);

  alu_op_e            op;
  logic [WIDTH-1:0]   lu_y;
  logic               lu_c, lu_valid;
  logic [2*WIDTH-1:0] au_y;
  logic               au_c, au_valid;

  assign op = alu_op_e'(sel);

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .op   (op),
    .a    (inp1),
    .b    (inp2),
    .y    (lu_y),
    .cout (lu_c),
    .valid(lu_valid)
  );

  arith_unit #(.WIDTH(WIDTH)) u_arith (
    .clk  (clk),
    .rst_n(rst_n),
    .op   (op),
    .a    (inp1),
    .b    (inp2),
    .start(start),
    .y    (au_y),
    .cout (au_c),
    .done (done),
    .valid(au_valid)
  );

  always_comb begin
    if (lu_valid) begin
      result = {{WIDTH{1'b0}}, lu_y};
      carry  = lu_c;
    end else if (au_valid) begin
      result = au_y;
      carry  = au_c;
    end else begin
      result = '0;
      carry  = 1'b0;
    end
  end

endmodule
