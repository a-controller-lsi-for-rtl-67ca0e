// wakeup_timer: ends the processor's sleep once a supply/clock transition
// is over.
//
// While VDD and f change, the processor must not execute code.  Software
// therefore writes the new speed, starts this timer with the transition
// time and puts the processor to sleep.  When the timer runs out the
// controller raises the interrupt request (int_req), which wakes the
// processor; int_req stays high until the processor acknowledges it
// (int_ack).  The same timer serves to sleep until the next sync frame.
//
// Timing: start at edge E with count N raises int_req after edge E+N
// (E+1 for N = 0 or 1).  int_ack high at an edge clears int_req at that
// edge; a new expiry in the same cycle wins over the acknowledge.
// A restart while running reloads the count.  The req/ack pair follows the
// source; the level-held request and the acknowledge rule are this design's
// choices.
module wakeup_timer #(
  parameter int unsigned W = hop_pkg::TIMER_W
) (
  input  logic         clk,
  input  logic         rst,      // asynchronous, active high
  input  logic         start,
  input  logic [W-1:0] count,
  input  logic         int_ack,
  output logic         int_req,
  output logic         busy,
  output logic [W-1:0] remain
);

  logic expire;

  prog_timer #(.W(W)) u_timer (
    .clk    (clk),
    .rst    (rst),
    .start  (start),
    .count  (count),
    .cancel (1'b0),
    .busy   (busy),
    .expire (expire),
    .remain (remain)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                     int_req <= 1'b0;
    else if (expire && !start)   int_req <= 1'b1;
    else if (int_ack)            int_req <= 1'b0;
  end

  // The request is only raised by an expiry.
  a_req_from_expiry: assert property (@(posedge clk) disable iff (rst)
    !int_req |=> (int_req -> $past(expire)));

endmodule
