// tb_clock_freq_selector: self-checking test of the clock frequency selector.
// The controller clock runs at 1/13 of the 2*fmax input (close to 33 MHz
// against 400 MHz on the reference system; 13 rather than 12 so that the
// two clocks drift through every phase of the divider).  The test checks that the output is
// fmax after reset, that a CFS write takes effect on the timed choice
// exactly `tcfs` controller cycles after the write edge, that the output
// then runs at fmax/2 (and back at fmax after the reverse write), counting
// output edges over a fixed window, and that no output pulse is ever
// shorter than one 2*fmax period or longer than two (no glitch, no stall).
module tb_clock_freq_selector;
  import hop_pkg::*;
  localparam int unsigned TW = 16;

  logic          clk = 1'b0, clk_2fmax = 1'b0, system_reset = 1'b0;
  logic          dec_cfs = 1'b0, data = 1'b0;
  logic [TW-1:0] tcfs = 16'd33;
  clk_sel_e      sel_req, sel_timed, sel_now;
  logic          pending, clk_out;
  int checks = 0, failures = 0;

  clock_freq_selector #(.TIMER_BITS(TW)) dut (.*);

  always #13 clk = ~clk;
  always #1  clk_2fmax = ~clk_2fmax;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // pulse-width monitor, in 2*fmax cycles
  int  width = 0, bad_width = 0, pulses = 0;
  logic last = 1'b0;
  always @(negedge clk_2fmax) begin
    if (!system_reset) begin
      if (clk_out == last) width++;
      else begin
        if (width < 1 || width > 2) begin
          bad_width++;
          $display("bad pulse width %0d at %0t", width, $time);
        end
        pulses++;
        width = 1;
      end
    end else width = 0;
    last = clk_out;
  end

  // rising edges of clk_out over 400 cycles of clk_2fmax
  task automatic count_rises(output int rises);
    logic prev;
    rises = 0;
    @(negedge clk_2fmax); prev = clk_out;
    repeat (400) begin
      @(negedge clk_2fmax);
      if (clk_out && !prev) rises++;
      prev = clk_out;
    end
  endtask

  // write a choice, return controller edges until the timed choice follows
  task automatic write_sel(input logic d, input int unsigned t, output int unsigned edges);
    @(negedge clk); tcfs = TW'(t); data = d; dec_cfs = 1'b1;
    @(posedge clk); #1 dec_cfs = 1'b0;
    check(sel_req == clk_sel_e'(d), "data flop takes Data[0]");
    edges = 0;
    while (sel_timed != clk_sel_e'(d) && edges < t + 10) begin
      check(pending, "pending while the timer runs");
      @(posedge clk); #1 edges++;
    end
  endtask

  initial begin
    int r;
    int unsigned e;
    #3 system_reset = 1'b1;
    #30;
    check(sel_req == CLK_FMAX && sel_timed == CLK_FMAX, "reset selects fmax");
    @(negedge clk) system_reset = 1'b0;
    repeat (4) @(negedge clk);
    count_rises(r);
    check(r == 200, $sformatf("fmax after reset: %0d rises in 400 cycles", r));
    check(sel_now == CLK_FMAX, "status shows fmax");

    repeat (3) foreach (tl[i]) begin
      write_sel(1'b1, tl[i], e);
      check(e == ((tl[i] < 1) ? 1 : tl[i]), $sformatf("tcfs %0d: switch after %0d edges", tl[i], e));
      repeat (2) @(negedge clk);
      count_rises(r);
      check(r == 100, $sformatf("fmax/2: %0d rises in 400 cycles", r));
      check(sel_now == CLK_FHALF, "status shows fmax/2");
      write_sel(1'b0, tl[i], e);
      check(e == ((tl[i] < 1) ? 1 : tl[i]), $sformatf("tcfs %0d: switch back after %0d edges", tl[i], e));
      repeat (2) @(negedge clk);
      count_rises(r);
      check(r == 200, $sformatf("fmax again: %0d rises in 400 cycles", r));
      check(sel_now == CLK_FMAX, "status shows fmax again");
    end

    // switch point: the output must not hold the old clock for long after the
    // timed choice changes (two synchroniser flops + at most 4 cycles)
    write_sel(1'b1, 5, e);
    repeat (12) @(negedge clk_2fmax);
    check(dut.sel_eff == CLK_FHALF, "new choice in effect within 12 cycles of clk_2fmax");

    check(bad_width == 0, $sformatf("%0d glitched or stretched pulses", bad_width));
    check(pulses > 1000, "output toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned tl[] = '{0, 1, 2, 33, 100};

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
