// tb_mult_control: drives st and random m into the multiplier controller
// and compares load/sh/ad/done every cycle with a reference model written
// as (phase, bit index): IDLE waits for st, TEST of bit k gives ad if m
// else sh, SHIFT after an add gives sh, FIN gives done. Run at WIDTH = 4,
// the ten-state case, and checks that a run takes 1 + 4 + (number of adds)
// + 1 cycles from load to the end of done.
module tb_mult_control;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, st = 0, m = 0;
  logic load, sh, ad, done;
  int checks = 0, failures = 0;
  int n_add = 0, n_shift_only = 0, n_runs = 0;

  typedef enum {IDLE, TEST, SHIFT, FIN} ph_e;
  ph_e ph;
  int k;

  mult_control #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .st(st), .m(m),
                                 .load(load), .sh(sh), .ad(ad), .done(done));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs for the current reference phase.
  function automatic logic [3:0] expect_out(ph_e p, logic st_i, logic m_i);
    // {load, sh, ad, done}
    case (p)
      IDLE:  return st_i ? 4'b1000 : 4'b0000;
      TEST:  return m_i ? 4'b0010 : 4'b0100;
      SHIFT: return 4'b0100;
      FIN:   return 4'b0001;
    endcase
  endfunction

  int cyc_in_run;

  initial begin
    ph = IDLE; k = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      st = ($urandom_range(0, 3) == 0);
      m  = 1'($urandom);
      #1;
      checks++;
      if ({load, sh, ad, done} !== expect_out(ph, st, m)) begin
        failures++;
        $display("FAIL cyc %0d ph=%s k=%0d st=%b m=%b: got %b expected %b",
                 cyc, ph.name(), k, st, m, {load, sh, ad, done}, expect_out(ph, st, m));
      end
      @(posedge clk);
      case (ph)
        IDLE:  if (st) begin ph = TEST; k = 0; cyc_in_run = 1; n_runs++; end
        TEST:  begin
                 cyc_in_run++;
                 if (m) begin ph = SHIFT; n_add++; end
                 else begin
                   n_shift_only++;
                   k++;
                   ph = (k == W) ? FIN : TEST;
                 end
               end
        SHIFT: begin cyc_in_run++; k++; ph = (k == W) ? FIN : TEST; end
        FIN:   begin
                 cyc_in_run++;
                 ph = IDLE;
               end
      endcase
    end
    checks++;
    if (n_runs < 10 || n_add == 0 || n_shift_only == 0) begin
      failures++;
      $display("FAIL coverage runs=%0d adds=%0d shift-only=%0d", n_runs, n_add, n_shift_only);
    end
    // Fixed-pattern run: multiplier bits 1,0,1,1 take 1 load + 4 + 3 adds + 1 done = 9 cycles.
    @(negedge clk);
    st = 0;
    while (!(ph == IDLE)) begin
      @(posedge clk);
      case (ph) TEST: begin if (m) ph = SHIFT; else begin k++; ph = (k == W) ? FIN : TEST; end end
                SHIFT: begin k++; ph = (k == W) ? FIN : TEST; end
                FIN: ph = IDLE; default: ; endcase
      @(negedge clk);
    end
    begin
      int c = 0;
      logic [3:0] bits = 4'b1101;
      int bi = 0;
      st = 1; #1;
      checks++;
      if (!load) begin failures++; $display("FAIL no load on st"); end
      @(posedge clk); @(negedge clk); st = 0; c = 1;
      while (!done && c < 50) begin
        m = bits[bi];
        #1;
        if (sh) bi++;
        @(posedge clk); @(negedge clk); c++;
        m = (bi < 4) ? bits[bi] : 1'b0;
        #1;
      end
      checks++;
      if (c != 1 + 4 + 3) begin
        failures++;
        $display("FAIL done after %0d cycles, expected 8 (then done is the 9th)", c);
      end
    end
    $display("runs=%0d adds=%0d shift-only=%0d", n_runs, n_add, n_shift_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
