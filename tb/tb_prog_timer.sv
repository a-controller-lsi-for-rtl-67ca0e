// tb_prog_timer: self-checking test of the programmable one-shot timer.
// For a set of counts (fixed corner cases and random ones) it starts the
// timer and checks that expire is seen exactly max(count,1) cycles after the
// start edge, that busy and remain follow, that cancel stops the timer
// without an expiry, and that a restart while running reloads the count.
module tb_prog_timer;
  localparam int unsigned W = 16;

  logic         clk = 1'b0, rst = 1'b1;
  logic         start = 1'b0, cancel = 1'b0;
  logic [W-1:0] count = '0;
  logic         busy, expire;
  logic [W-1:0] remain;

  int checks = 0, failures = 0;

  prog_timer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Start with count n; return the number of edges from the start edge to
  // the edge at which expire was sampled high.
  task automatic run(input int unsigned n, output int unsigned edges);
    @(negedge clk);
    count = W'(n);
    start = 1'b1;
    @(posedge clk);           // start edge
    #1 start = 1'b0;
    edges = 0;
    check(busy && remain == W'(n), $sformatf("busy/remain after start n=%0d", n));
    forever begin
      edges++;
      if (expire) begin
        @(posedge clk);
        break;
      end
      @(posedge clk);
      #1;
      if (edges > n + 5) break;
    end
    #1 check(!busy && !expire, $sformatf("idle after expiry n=%0d", n));
  endtask

  initial begin
    int unsigned e;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(!busy && !expire && remain == '0, "idle after reset");

    foreach (e_list[i]) begin
      run(e_list[i], e);
      check(e == ((e_list[i] < 1) ? 1 : e_list[i]),
            $sformatf("count %0d expired after %0d edges", e_list[i], e));
    end
    repeat (20) begin
      int unsigned n = $urandom_range(2, 300);
      run(n, e);
      check(e == n, $sformatf("random count %0d expired after %0d edges", n, e));
    end

    // cancel: no expiry afterwards
    @(negedge clk); count = 16'd20; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (5) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk); cancel = 1'b0;
    check(!busy, "busy cleared by cancel");
    begin
      bit seen = 0;
      repeat (30) begin @(negedge clk); if (expire) seen = 1; end
      check(!seen, "no expiry after cancel");
    end

    // restart while running reloads
    @(negedge clk); count = 16'd10; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (4) @(negedge clk);
    count = 16'd10; start = 1'b1;          // restart; edge R
    @(posedge clk); #1 start = 1'b0;
    begin
      int unsigned k = 0;
      while (!expire && k < 40) begin @(posedge clk); #1 k++; end
      // expire is high during the 10th cycle after R: k = 9 edges later
      check(k == 9, $sformatf("restart reloads: expire %0d edges after restart", k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned e_list[] = '{0, 1, 2, 3, 7, 66, 255};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
