// tb_wakeup_timer: self-checking test of the wake-up timer.
// Starts the timer with a range of counts and checks that int_req rises
// exactly `count` edges after the start edge (one for 0 and 1), stays high
// until int_ack, and drops on the acknowledge.  Also checks that a restart
// while running reloads, that the transition time of the reference system
// (200 us = 6600 cycles at 33 MHz) is timed exactly, and that an expiry
// coinciding with an acknowledge keeps the request.
module tb_wakeup_timer;
  localparam int unsigned W = 32;
  logic         clk = 1'b0, rst = 1'b1;
  logic         start = 1'b0, int_ack = 1'b0;
  logic [W-1:0] count = '0, remain;
  logic         int_req, busy;
  int checks = 0, failures = 0;

  wakeup_timer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Returns edges from the start edge until the edge after which int_req is high.
  task automatic sleep_for(input int unsigned n, output int unsigned edges);
    @(negedge clk);
    count = n; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    edges = 0;
    while (!int_req && edges < n + 10) begin
      @(posedge clk); #1 edges++;
    end
  endtask

  task automatic ack();
    @(negedge clk);
    check(int_req, "request held until acknowledged");
    int_ack = 1'b1;
    @(posedge clk); #1 int_ack = 1'b0;
    check(!int_req, "request dropped by acknowledge");
  endtask

  initial begin
    int unsigned e;
    int unsigned list[] = '{0, 1, 2, 5, 33, 6600};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(!int_req && !busy, "idle after reset");
    foreach (list[i]) begin
      sleep_for(list[i], e);
      check(e == ((list[i] < 1) ? 1 : list[i]),
            $sformatf("count %0d: int_req after %0d edges", list[i], e));
      repeat (3) @(negedge clk);
      ack();
    end
    repeat (10) begin
      int unsigned n = $urandom_range(2, 500);
      sleep_for(n, e);
      check(e == n, $sformatf("random count %0d: int_req after %0d edges", n, e));
      ack();
    end
    // restart while running
    @(negedge clk); count = 20; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (10) @(negedge clk);
    sleep_for(20, e);
    check(e == 20, $sformatf("restart reloads: %0d edges", e));
    ack();
    // expiry and acknowledge in the same cycle: the new request stays
    @(negedge clk); count = 3; start = 1'b1;
    @(negedge clk); start = 1'b0;
    int_ack = 1'b1;                       // sampled at the 3 edges up to expiry
    repeat (3) @(negedge clk);
    int_ack = 1'b0;
    check(int_req, "expiry wins over a simultaneous acknowledge");
    ack();

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
