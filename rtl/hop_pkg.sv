// hop_pkg: constants and types shared by the VDD-hopping controller.
//
// The controller is a small bus slave.  The processor writes "speed
// information" (which supply rail and which clock frequency it wants) and
// timer settings into it with ordinary I/O writes, and reads the current
// time back.  The register layout below is this design's own choice; the
// published controller only shows that Data[0:1] goes to the power-switch
// flops and Data[0] to the clock-frequency flop, each under its own decoded
// strobe ("Dec ps", "Dec cfs").
//
// Register map (byte offsets from the controller's base address, one 32-bit
// word each):
//   0x00 PS      W/R  bit0 = gate level of the VDDmax switch, bit1 = gate
//                     level of the VDDmin switch (pMOS: 0 = switch on).
//                     Reset value 2'b10: VDDmax connected, VDDmin off.
//   0x04 CFS     W/R  bit0 = 0 selects fmax, 1 selects fmax/2.  Reset 0.
//   0x08 TOV_MAX W/R  turn-off delay of the VDDmax gate, in clock cycles.
//   0x0C TOV_MIN W/R  turn-off delay of the VDDmin gate, in clock cycles.
//   0x10 TCFS    W/R  delay from a CFS write to the clock switch, in cycles.
//   0x14 TIME    W/R  current-time counter (write loads it).
//   0x18 WAKE    W    starts the wake-up timer with the written count.
//                R    cycles left on the wake-up timer.
//   0x1C STAT    R    bit0 int_req, bit1 wake-up timer busy, bit2 CFS change
//                     pending, bit3 switch turn-off pending, bit4 VDDmax gate
//                     level now driven, bit5 VDDmin gate level now driven,
//                     bit8 clock selection now in effect.
package hop_pkg;

  localparam int unsigned DATA_W = 32;   // SH-4 class 32-bit I/O data
  localparam int unsigned TIMER_W = 32;  // width of every timer count

  // Clock cycles of the 33 MHz controller clock in 2 us, the switch overlap
  // used on the measured boards (2 us * 33 MHz = 66).
  localparam int unsigned OVERLAP_CYCLES = 66;

  typedef enum logic [2:0] {
    REG_PS      = 3'd0,
    REG_CFS     = 3'd1,
    REG_TOV_MAX = 3'd2,
    REG_TOV_MIN = 3'd3,
    REG_TCFS    = 3'd4,
    REG_TIME    = 3'd5,
    REG_WAKE    = 3'd6,
    REG_STAT    = 3'd7
  } reg_e;

  // Power-switch gate levels (pMOS switches are on when their gate is low).
  typedef struct packed {
    logic min_n;  // gate of the VDDmin (1.2 V) switch
    logic max_n;  // gate of the VDDmax (2.0 V) switch
  } gates_t;

  localparam gates_t GATES_RESET = '{min_n: 1'b1, max_n: 1'b0};

  // Clock selection.
  typedef enum logic {
    CLK_FMAX  = 1'b0,
    CLK_FHALF = 1'b1
  } clk_sel_e;

endpackage
