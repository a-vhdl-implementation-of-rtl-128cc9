// mult_control: control state machine of the add-and-shift multiplier.
// It steps through states S0 .. S(2*WIDTH+1). S0 waits for st and issues
// load when it comes. Each odd state S(2k+1) looks at m, the current
// multiplier bit: with m = 1 it issues ad and moves to S(2k+2), which then
// issues sh; with m = 0 it issues sh at once and skips to S(2k+3). The last
// state S(2*WIDTH+1) issues done for one cycle and returns to S0.
// Outputs are combinational from the state and m (Mealy), so each control
// signal acts on the datapath at the next rising clock edge.
// For WIDTH = 4 this is exactly the ten-state diagram of the source
// (St/Load, M/Ad, M'/Sh, -/Sh, -/Done); the generalisation to 2*WIDTH+2
// states, the binary state number and the asynchronous active-low reset
// to S0 are this design's choices.
module mult_control #(
  parameter int unsigned WIDTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic st,     // St: start
  input  logic m,      // M: multiplier bit in ACC(0)
  output logic load,   // Load: clear the partial product, load the operands
  output logic sh,     // Sh: shift ACC right by one
  output logic ad,     // Ad: add the multiplicand to the partial product
  output logic done    // Done: product complete
);

  localparam int unsigned LAST = 2 * WIDTH + 1;
  localparam int unsigned SW   = $clog2(LAST + 1);

  typedef logic [SW-1:0] state_t;

  state_t state, state_next;

  always_comb begin
    load       = 1'b0;
    sh         = 1'b0;
    ad         = 1'b0;
    done       = 1'b0;
    state_next = state;
    if (state == state_t'(0)) begin
      if (st) begin
        load       = 1'b1;
        state_next = state_t'(1);
      end
    end else if (state == state_t'(LAST)) begin
      done       = 1'b1;
      state_next = state_t'(0);
    end else if (state[0]) begin
      // S1, S3, ...: test the multiplier bit
      if (m) begin
        ad         = 1'b1;
        state_next = state + state_t'(1);
      end else begin
        sh         = 1'b1;
        state_next = state + state_t'(2);
      end
    end else begin
      // S2, S4, ...: shift after an add
      sh         = 1'b1;
      state_next = state + state_t'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= state_next;
  end

  // Only one datapath action per cycle.
  a_onehot_ctl: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({load, sh, ad, done}));
  a_state_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  state <= state_t'(LAST));

endmodule
