// tb_current_time_timer: self-checking test of the current-time counter.
// A reference count kept by the testbench is compared with `now` every
// cycle, across loads of random values and across the wrap-around of a
// reduced 12-bit counter.  A second instance at the full 32-bit width is
// checked to reach 6.6 million counts, one 200 ms sync frame at 33 MHz.
module tb_current_time_timer;
  localparam int unsigned W = 12;
  logic         clk = 1'b0, rst = 1'b1;
  logic         load = 1'b0;
  logic [W-1:0] load_value = '0, now;
  logic [31:0]  now32;
  int checks = 0, failures = 0;

  current_time_timer #(.W(W)) dut (.*);
  current_time_timer u_full (.clk(clk), .rst(rst), .load(1'b0), .load_value('0), .now(now32));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] ref_now;
    int wraps = 0;
    repeat (2) @(posedge clk);
    #1 check(now == '0, "zero in reset");
    rst = 1'b0;
    ref_now = '0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 999) == 0) begin
        load = 1'b1; load_value = W'($urandom);
      end else load = 1'b0;
      @(posedge clk);
      if (load) ref_now = load_value;
      else begin
        if (ref_now == '1) wraps++;
        ref_now = ref_now + 1'b1;
      end
      #1 check(now == ref_now, $sformatf("now %0d ref %0d", now, ref_now));
    end
    load = 1'b0;
    check(wraps > 0, "counter wrapped at least once");
    // 200 ms at 33 MHz
    wait (now32 == 32'd6_600_000);
    check(now32 == 32'd6_600_000, "full-width counter reaches one sync frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
