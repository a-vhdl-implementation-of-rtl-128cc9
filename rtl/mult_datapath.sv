// mult_datapath: datapath of the add-and-shift multiplier.
// ACC is 2*WIDTH+1 bits. Its low WIDTH bits hold the multiplier, which is
// consumed one bit per shift; ACC(0) is presented as m. The bits above hold
// the growing partial product, with ACC(2*WIDTH) catching the adder's carry
// out (cm). A WIDTH-bit parallel adder adds the stored multiplicand to
// ACC(2*WIDTH-1:WIDTH).
//   load: ACC(2*WIDTH:WIDTH) <= 0, ACC(WIDTH-1:0) <= mplier, store mcand
//   ad:   ACC(2*WIDTH:WIDTH) <= {cm, sum}
//   sh:   ACC <= ACC >> 1 (0 enters at the top)
// All actions take effect on the rising clock edge. After WIDTH shifts the
// product is ACC(2*WIDTH-1:0) and stays there until the next load.
// The accumulator layout, the adder and the carry into the top ACC bit
// follow the source's 4-bit block diagram, scaled to WIDTH; the multiplicand
// register, the reset and the 0 entering on a shift are this design's
// choices.
module mult_datapath #(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               sh,
  input  logic               ad,
  input  logic [WIDTH-1:0]   mcand,
  input  logic [WIDTH-1:0]   mplier,
  output logic               m,
  output logic [2*WIDTH-1:0] product
);

  logic [2*WIDTH:0] acc;
  logic [WIDTH-1:0] mcand_q;
  logic [WIDTH-1:0] sum;
  logic             cm;

  parallel_adder #(.WIDTH(WIDTH)) u_add (
    .a   (acc[2*WIDTH-1:WIDTH]),
    .b   (mcand_q),
    .cin (1'b0),
    .s   (sum),
    .cout(cm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      mcand_q <= '0;
    end else if (load) begin
      acc     <= {{(WIDTH + 1){1'b0}}, mplier};
      mcand_q <= mcand;
    end else if (ad) begin
      acc[2*WIDTH:WIDTH] <= {cm, sum};
    end else if (sh) begin
      acc <= {1'b0, acc[2*WIDTH:1]};
    end
  end

  assign m       = acc[0];
  assign product = acc[2*WIDTH-1:0];

endmodule
