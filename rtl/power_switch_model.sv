// power_switch_model: behavioural model of the two on-chip power switches
// and the VDD line they feed.  This is not synthesizable logic: the real
// parts are two comb-shaped pMOS transistors of 270,000 um gate width each,
// sized so that the drop across a switch stays under 0.05 V at the 0.13 A
// load of the processor at VDDmin, and able to pass 0.4 A at VDDmax.
//
// The model reports the rail the VDD line is connected to, in millivolts:
// a switch conducts while its gate is low.  With both switches on, the line
// follows the higher rail (VDDmax), and the model flags the overlap.  With
// both off, the line is cut off: the model reports 0 mV and flags the
// cut-off; it does not track the slow sag of the decoupling capacitance or
// the 100-200 us rise and fall times of the real supply line.
//
// Ports: gate_max_n and gate_min_n are the gate levels from the switch
// control; vdd_mv is the VDD line, overlap and cut_off are observation
// flags.  All outputs follow the gates after `t_switch` time units.
module power_switch_model #(
  parameter int unsigned VDDMAX_MV = 2000,   // VDDmax rail, 2.0 V
  parameter int unsigned VDDMIN_MV = 1200,   // VDDmin rail, 1.2 V
  parameter int unsigned T_SWITCH  = 1       // switching delay, time units
) (
  input  logic        gate_max_n,
  input  logic        gate_min_n,
  output logic [11:0] vdd_mv,
  output logic        overlap,
  output logic        cut_off
);

  logic [11:0] level;

  always_comb begin
    if (!gate_max_n)      level = 12'(VDDMAX_MV);
    else if (!gate_min_n) level = 12'(VDDMIN_MV);
    else                  level = 12'd0;
  end

  assign #(T_SWITCH) vdd_mv  = level;
  assign #(T_SWITCH) overlap = !gate_max_n && !gate_min_n;
  assign #(T_SWITCH) cut_off = gate_max_n && gate_min_n;

endmodule
