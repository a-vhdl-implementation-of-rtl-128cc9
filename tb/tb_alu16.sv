// tb_alu16: end-to-end test of the ALU at its default size. Every one of
// the 32 select codes is driven with corner and random operands and the
// 32-bit result and the carry/borrow bit are compared with a reference
// model written here from the instruction definitions. Multiplications
// run through start/done and are checked for product and latency. The
// test counts how often each mechanism happened (each of the 17
// instructions, an unused code, an adder carry out, a subtraction borrow,
// increment wrap-around, decrement borrow, a bit shifted out on the carry,
// each comparison outcome, a multiplier add step and a shift-only step,
// operands changed during a multiplication) and fails for any that never
// did.
module tb_alu16;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] inp1, inp2;
  logic [4:0] sel;
  logic [2*W-1:0] result;
  logic carry, done;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_ADD_CARRY, EV_SUB_BORROW, EV_INC_WRAP, EV_DEC_BORROW, EV_SHIFT_CARRY,
    EV_CMP_LT, EV_CMP_EQ, EV_CMP_GT, EV_MUL_ADD_STEP, EV_MUL_SHIFT_ONLY,
    EV_MUL_OPERAND_CHANGE, EV_UNUSED_CODE, EV_COUNT
  } ev_e;
  int ev_cnt [EV_COUNT];
  int op_cnt [17];

  alu16 dut (.clk(clk), .rst_n(rst_n), .inp1(inp1), .inp2(inp2), .sel(sel), .start(start),
             .result(result), .carry(carry), .done(done));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the combinational instructions: {carry, result}.
  function automatic logic [2*W:0] ref_model(input logic [4:0] s, input logic [W-1:0] x, z);
    logic [W-1:0] r;
    logic c;
    r = '0; c = 1'b0;
    case (s)
      5'd0:  r = ~x;
      5'd1:  r = x & z;
      5'd2:  r = x | z;
      5'd3:  r = ~(x & z);
      5'd4:  r = ~(x | z);
      5'd5:  r = x ^ z;
      5'd6:  r = ~(x ^ z);
      5'd7:  {c, r} = {x, 1'b0};
      5'd8:  {r, c} = {1'b0, x};
      5'd9:  {c, r} = {x[W-1], x[W-2:0], x[W-1]};
      5'd10: {r, c} = {x[0], x[W-1:1], x[0]};
      5'd11: {c, r} = {1'b0, x} + {1'b0, z};
      5'd12: begin r = x - z; c = x < z; end
      5'd13: {c, r} = {1'b0, x} + 17'd1;
      5'd14: begin r = x - 1; c = x == 0; end
      5'd16: begin r = W'({x > z, x == z, x < z}); c = x < z; end
      default: ;
    endcase
    return {c, {W{1'b0}}, r};
  endfunction

  task automatic check_comb(input logic [4:0] s, input logic [W-1:0] x, z);
    logic [2*W:0] e;
    sel = s; inp1 = x; inp2 = z;
    #1;
    e = ref_model(s, x, z);
    checks++;
    if ({carry, result} !== e) begin
      failures++;
      $display("FAIL sel=%b a=%h b=%h: carry=%b result=%h, expected carry=%b result=%h",
               s, x, z, carry, result, e[2*W], e[2*W-1:0]);
    end
    if (s <= 5'd16) op_cnt[s]++;
    else ev_cnt[EV_UNUSED_CODE]++;
    if (e[2*W]) begin
      case (s)
        5'd7, 5'd8, 5'd9, 5'd10: ev_cnt[EV_SHIFT_CARRY]++;
        5'd11: ev_cnt[EV_ADD_CARRY]++;
        5'd12: ev_cnt[EV_SUB_BORROW]++;
        5'd13: ev_cnt[EV_INC_WRAP]++;
        5'd14: ev_cnt[EV_DEC_BORROW]++;
        default: ;
      endcase
    end
    if (s == 5'd16) begin
      if (x < z) ev_cnt[EV_CMP_LT]++;
      else if (x == z) ev_cnt[EV_CMP_EQ]++;
      else ev_cnt[EV_CMP_GT]++;
    end
  endtask

  task automatic run_mul(input logic [W-1:0] x, z, input bit scramble);
    int cycles;
    logic [2*W-1:0] e;
    e = (2*W)'(x) * (2*W)'(z);
    @(negedge clk);
    sel = 5'b01111; inp1 = x; inp2 = z; start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    if (scramble) begin
      inp1 = W'($urandom); inp2 = W'($urandom);
      ev_cnt[EV_MUL_OPERAND_CHANGE]++;
    end
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != W + $countones(z) + 1) begin
      failures++;
      $display("FAIL MUL latency %0d, expected %0d", cycles, W + $countones(z) + 1);
    end
    checks++;
    if (result !== e || carry !== 1'b0) begin
      failures++;
      $display("FAIL MUL %h*%h = %h carry %b, expected %h", x, z, result, carry, e);
    end
    op_cnt[15]++;
    ev_cnt[EV_MUL_ADD_STEP]   += $countones(z);
    ev_cnt[EV_MUL_SHIFT_ONLY] += W - $countones(z);
    // The product stays on the output while sel stays on MULTIPLICATION.
    repeat (2) @(negedge clk);
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL MUL product not held");
    end
  endtask

  initial begin
    sel = '0; inp1 = '0; inp2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 32; s++) begin
      check_comb(5'(s), '1, 16'd1);
      check_comb(5'(s), '0, 16'd1);
      check_comb(5'(s), 16'h1234, 16'h1234);
      check_comb(5'(s), 16'h8001, 16'h7FFE);
      for (int i = 0; i < 200; i++) check_comb(5'(s), W'($urandom), W'($urandom));
    end
    run_mul('1, '1, 0);
    run_mul(16'd0, 16'd0, 0);
    run_mul(16'd255, 16'd256, 1);
    for (int i = 0; i < 100; i++) run_mul(W'($urandom), W'($urandom), i[0]);

    for (int i = 0; i < 17; i++) begin
      checks++;
      if (op_cnt[i] == 0) begin failures++; $display("FAIL instruction %0d never ran", i); end
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      checks++;
      if (ev_cnt[e] == 0) begin failures++; $display("FAIL %s never happened", ev_e'(e)); end
      $display("%-22s %0d", ev_e'(e), ev_cnt[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
