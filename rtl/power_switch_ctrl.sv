// power_switch_ctrl: gate control of the two supply power switches.
//
// The processor's VDD line is connected either to VDDmax (2.0 V, for fmax)
// or to VDDmin (1.2 V, for fmax/2) by two large pMOS switches.  Software
// selects a rail by writing two gate levels, Data[0] for the VDDmax switch
// and Data[1] for the VDDmin switch, under the decoded strobe "Dec ps".  As
// in the published schematic, the two request flops are cleared and set by
// the system reset so that the VDDmax flop comes up low (switch on) and the
// VDDmin flop high (switch off): the processor always boots on VDDmax.
//
// Each gate is driven through a programmable timer.  The rails must never be
// both cut off from the VDD line (the line sags and the processor may hang),
// and a short period with both switches on is harmless because of the
// decoupling capacitance.  This block therefore makes before it breaks: a
// request to turn a switch on reaches its gate at once, a request to turn it
// off reaches the gate only after that gate's programmed delay (tov_max or
// tov_min cycles).  A hop written as one two-bit write thus gives an overlap
// of the programmed length in either direction.  The make-before-break rule
// and its timing are this design's choice; the source only says the timers
// sit at the gates and adjust the overlap.  A request to turn a switch back
// on while its turn-off is pending cancels the turn-off.
//
// Timing: the write edge updates req and turns a switch on; the turn-off
// happens tov cycles after the write edge (one cycle for tov = 0 or 1).
// Writing both bits high cuts VDD off after the delays; the hardware does
// not forbid it.
module power_switch_ctrl
  import hop_pkg::*;
#(
  parameter int unsigned TIMER_BITS = hop_pkg::TIMER_W
) (
  input  logic                  clk,
  input  logic                  system_reset,  // asynchronous, active high
  input  logic                  dec_ps,        // write strobe from the decoder
  input  logic [1:0]            data,          // Data[0:1]: {min_n, max_n}
  input  logic [TIMER_BITS-1:0] tov_max,       // turn-off delay, VDDmax gate
  input  logic [TIMER_BITS-1:0] tov_min,       // turn-off delay, VDDmin gate
  output gates_t                req,           // the request flops
  output gates_t                gate,          // levels driven to the switches
  output logic                  pending        // a turn-off is waiting
);

  logic [1:0]            req_d, gate_q, turn_off, busy, expire, start, cancel;
  logic [TIMER_BITS-1:0] tov [2];

  assign tov[0] = tov_max;
  assign tov[1] = tov_min;

  // Request flops (Fig. 12(A)): Data0 flop reset low, Data1 flop set high.
  always_ff @(posedge clk or posedge system_reset) begin
    if (system_reset) req_d <= GATES_RESET;
    else if (dec_ps)  req_d <= data;
  end

  for (genvar g = 0; g < 2; g++) begin : g_gate
    // Turn-off requested for a switch that is on: run its timer.
    assign start[g]  = dec_ps && data[g] && !gate_q[g] && !(busy[g] && req_d[g]);
    // Turn-on requested: drop any pending turn-off.
    assign cancel[g] = dec_ps && !data[g];

    prog_timer #(.W(TIMER_BITS)) u_timer (
      .clk    (clk),
      .rst    (system_reset),
      .start  (start[g]),
      .count  (tov[g]),
      .cancel (cancel[g]),
      .busy   (busy[g]),
      .expire (expire[g]),
      .remain ()
    );

    assign turn_off[g] = expire[g] && !cancel[g];

    always_ff @(posedge clk or posedge system_reset) begin
      if (system_reset)       gate_q[g] <= GATES_RESET[g];
      else if (cancel[g])     gate_q[g] <= 1'b0;
      else if (turn_off[g])   gate_q[g] <= 1'b1;
    end
  end

  assign req     = req_d;
  assign gate    = gate_q;
  assign pending = |busy;

  // The gates may only rise (switch off) when their own timer expires.
  a_off_only_by_timer_max: assert property (@(posedge clk) disable iff (system_reset)
    !gate_q[0] |=> (gate_q[0] -> $past(turn_off[0])));
  a_off_only_by_timer_min: assert property (@(posedge clk) disable iff (system_reset)
    !gate_q[1] |=> (gate_q[1] -> $past(turn_off[1])));

endmodule
