// prog_timer: programmable one-shot down-counting timer.
//
// The controller uses the same kind of timer in four places: at the gate of
// each power switch (to make the two switches overlap), in front of the clock
// frequency selector (so the clock does not change while code runs) and as
// the wake-up timer that ends the processor's sleep after a transition.  The
// controller only names these "programmable timers"; this counter is the
// simplest circuit that does what they are said to do.
//
// Interface and timing, all on the rising edge of clk:
//   start  load `count` and run.  A start while running reloads.
//   cancel stop without expiring (start wins over cancel).
//   expire high during the last running cycle.  Logic that acts on expire
//          therefore acts on the edge that lies `count` cycles after the
//          edge that sampled start (one cycle for count = 0 or 1).
//   busy   high from the edge after start until that edge.
//   remain cycles still to go (0 when idle).
module prog_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,     // asynchronous, active high
  input  logic         start,
  input  logic [W-1:0] count,
  input  logic         cancel,
  output logic         busy,
  output logic         expire,
  output logic [W-1:0] remain
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy   <= 1'b0;
      remain <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      remain <= count;
    end else if (cancel || expire) begin
      busy   <= 1'b0;
      remain <= '0;
    end else if (busy) begin
      remain <= remain - 1'b1;
    end
  end

  assign expire = busy && (remain <= W'(1));

endmodule
