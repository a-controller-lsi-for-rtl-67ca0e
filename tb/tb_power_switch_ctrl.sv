// tb_power_switch_ctrl: self-checking test of the power-switch gate control.
// Checks the boot state (VDDmax on, VDDmin off), then the two hops the
// hopping software makes (VDDmax -> VDDmin and back) with the reference
// 2 us overlap of 66 cycles: both switches must be on for exactly the
// programmed overlap and never both off.  Finally a long random sequence of
// writes and delay settings is compared cycle by cycle with a reference
// model of the make-before-break rule written in the testbench.
module tb_power_switch_ctrl;
  import hop_pkg::*;
  localparam int unsigned TW = 16;

  logic          clk = 1'b0, system_reset = 1'b0;
  logic          dec_ps = 1'b0;
  logic [1:0]    data = 2'b10;
  logic [TW-1:0] tov_max = TW'(OVERLAP_CYCLES), tov_min = TW'(OVERLAP_CYCLES);
  gates_t        req, gate;
  logic          pending;
  int checks = 0, failures = 0;

  power_switch_ctrl #(.TIMER_BITS(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // reference model state
  logic [1:0] g_ref, pend;
  int unsigned left [2];

  task automatic ref_edge(input logic wr, input logic [1:0] d, input int unsigned tv [2]);
    for (int g = 0; g < 2; g++) begin
      if (wr && !d[g]) begin
        g_ref[g] = 1'b0; pend[g] = 1'b0;
      end else if (pend[g]) begin
        left[g]--;
        if (left[g] == 0) begin g_ref[g] = 1'b1; pend[g] = 1'b0; end
      end else if (wr && d[g] && !g_ref[g]) begin
        pend[g] = 1'b1; left[g] = (tv[g] < 1) ? 1 : tv[g];
      end
    end
  endtask

  // One write, then count cycles of overlap / cut-off until things settle.
  task automatic hop(input logic [1:0] d, output int both_on, output int both_off);
    @(negedge clk); data = d; dec_ps = 1'b1;
    @(negedge clk); dec_ps = 1'b0;
    both_on = 0; both_off = 0;
    if (!gate.max_n && !gate.min_n) both_on++;
    repeat (200) begin
      @(negedge clk);
      if (!gate.max_n && !gate.min_n) both_on++;
      if (gate.max_n && gate.min_n) both_off++;
    end
  endtask

  initial begin
    int on, off;
    int unsigned tv [2];
    #1 system_reset = 1'b1;   // asynchronous reset edge
    #1;
    check(gate.max_n == 1'b0 && gate.min_n == 1'b1, "reset: VDDmax on, VDDmin off");
    check(req == GATES_RESET, "reset: request flops");
    repeat (2) @(negedge clk);
    system_reset = 1'b0;
    check(gate.max_n == 1'b0 && gate.min_n == 1'b1, "after reset: VDDmax on");

    hop(2'b01, on, off);    // to VDDmin: max off, min on
    check(gate.max_n && !gate.min_n, "hop down: VDDmin connected");
    check(on == OVERLAP_CYCLES, $sformatf("hop down overlap %0d cycles", on));
    check(off == 0, "hop down never cuts VDD off");
    hop(2'b10, on, off);    // back to VDDmax
    check(!gate.max_n && gate.min_n, "hop up: VDDmax connected");
    check(on == OVERLAP_CYCLES, $sformatf("hop up overlap %0d cycles", on));
    check(off == 0, "hop up never cuts VDD off");

    // random writes against the reference model
    g_ref = gate; pend = 2'b00;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      dec_ps = ($urandom_range(0, 7) == 0);
      data = 2'($urandom);
      if ($urandom_range(0, 15) == 0) begin
        tov_max = TW'($urandom_range(0, 12));
        tov_min = TW'($urandom_range(0, 12));
      end
      tv[0] = tov_max; tv[1] = tov_min;
      @(posedge clk);
      ref_edge(dec_ps, data, tv);
      #1;
      check(gate == g_ref, $sformatf("gates %b, model %b", gate, g_ref));
      check(pending == |pend, "pending flag");
      if (dec_ps) check(req == data, "request flops follow Dec ps");
    end

    // reset in the middle of a pending turn-off restores the boot state
    @(negedge clk); dec_ps = 1'b0;
    tov_max = 16'd50; data = 2'b11; dec_ps = 1'b1;
    @(negedge clk); dec_ps = 1'b0;
    system_reset = 1'b1; #1;
    check(gate.max_n == 1'b0 && gate.min_n == 1'b1 && !pending, "reset restores VDDmax");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
