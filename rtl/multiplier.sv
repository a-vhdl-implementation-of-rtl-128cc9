// multiplier: sequential WIDTH x WIDTH unsigned add-and-shift multiplier.
// mult_control steps through the multiplier bits; for a 1 bit it adds the
// multiplicand to the partial product and then shifts, for a 0 bit it only
// shifts. Interface: pulse st (sampled while idle) with mcand and mplier
// valid; both operands are captured in that cycle. done is high for one
// cycle when product is complete; product then holds until the next start.
// Timing: done is high WIDTH + popcount(mplier) + 1 cycles after the clock
// edge that takes st (one load cycle, one or two cycles per bit).
// The algorithm and controller follow the source; the interface details are
// this design's choices.
module multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               st,
  input  logic [WIDTH-1:0]   mcand,
  input  logic [WIDTH-1:0]   mplier,
  output logic [2*WIDTH-1:0] product,
  output logic               done
);

  logic load, sh, ad, m;

  mult_control #(.WIDTH(WIDTH)) u_ctl (
    .clk  (clk),
    .rst_n(rst_n),
    .st   (st),
    .m    (m),
    .load (load),
    .sh   (sh),
    .ad   (ad),
    .done (done)
  );

  mult_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .sh     (sh),
    .ad     (ad),
    .mcand  (mcand),
    .mplier (mplier),
    .m      (m),
    .product(product)
  );

endmodule
