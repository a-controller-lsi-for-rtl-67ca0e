// current_time_timer: free-running time base read by the hopping software.
//
// The frequency/voltage decision is made in software: before each timeslot
// it compares the time already used in the sync frame with the time still
// needed in the worst case.  This timer gives it the current time.  It
// counts controller clock cycles (33 MHz on the measured system, so 200 ms
// is 6.6 million counts and 32 bits last about 130 s) and wraps.  Software
// can load it, for example with zero at the start of each sync frame.
// Counting raw clock cycles, the load port and the width are this design's
// choices; the source only says that a timer watches the current time.
//
// Timing: a load at edge E makes `now` equal the loaded value after E; the
// count then advances by one per clock edge.
module current_time_timer #(
  parameter int unsigned W = hop_pkg::TIMER_W
) (
  input  logic         clk,
  input  logic         rst,        // asynchronous, active high
  input  logic         load,
  input  logic [W-1:0] load_value,
  output logic [W-1:0] now
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       now <= '0;
    else if (load) now <= load_value;
    else           now <= now + 1'b1;
  end

endmodule
