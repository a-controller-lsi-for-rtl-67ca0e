// vdd_hopping_lsi: controller for VDD-hopping with an off-the-shelf processor.
//
// VDD-hopping lowers a processor's power by running each slice of a
// real-time task as slowly as its deadline allows.  Software on the processor
// decides, slice by slice, between two operating points, fmax at VDDmax
// (200 MHz, 2.0 V on the reference system) and fmax/2 at VDDmin (100 MHz,
// 1.2 V), and tells this controller through plain I/O writes.  The
// controller owns everything the processor cannot do for itself:
//
//   * power_switch_ctrl + power_switch_model: connect the processor's VDD
//     line to VDDmax or VDDmin through two pMOS switches, with a programmable
//     overlap so the line is never left floating; VDDmax after reset;
//   * clock_freq_selector: divides a 2*fmax clock to fmax or fmax/2 and
//     switches between them cleanly, held back by a programmable timer;
//   * current_time_timer: the time base the software compares its deadlines
//     against;
//   * wakeup_timer: wakes the processor with an interrupt once a transition
//     is over (the processor sleeps through it);
//   * addr_decoder (one per register): the all-purpose decoder producing
//     the register strobes.
//
// Bus: a single-cycle synchronous slave on clk.  A write takes effect at the
// rising edge where cs and we are high; a read returns rdata combinationally
// while cs is high and we low.  The register map is in hop_pkg.  The bus
// protocol and the register map are this design's own; the source connects
// the controller to the processor's I/O bus through a VME bus interface.
//
// Clocks: clk is the controller clock (33 MHz on the reference system);
// clk_2fmax is the external clock at twice fmax from which clk_out is
// divided.  system_reset is asynchronous and active high.
module vdd_hopping_lsi
  import hop_pkg::*;
#(
  parameter int unsigned        ADDR_W     = 16,
  parameter logic [ADDR_W-1:0]  BASE_ADDR  = 16'h0100,
  parameter int unsigned        TOV_RESET  = hop_pkg::OVERLAP_CYCLES,
  parameter int unsigned        TCFS_RESET = 33
) (
  input  logic              clk,
  input  logic              clk_2fmax,
  input  logic              system_reset,
  // processor I/O bus
  input  logic              cs,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // interrupt
  output logic              int_req,
  input  logic              int_ack,
  // processor clock
  output logic              clk_out,
  // power switches
  output logic              gate_max_n,
  output logic              gate_min_n,
  output logic [11:0]       vdd_mv,
  output logic              vdd_overlap,
  output logic              vdd_cut_off
);

  localparam int unsigned NREG = 8;

  // ---- decoders: one strobe per register --------------------------------
  logic [NREG-1:0] sel, wr;

  for (genvar r = 0; r < NREG; r++) begin : g_dec
    addr_decoder #(
      .ADDR_W    (ADDR_W),
      .MATCH     (BASE_ADDR | ADDR_W'(r * 4)),
      .DONT_CARE (ADDR_W'(3))
    ) u_dec (
      .addr (addr),
      .en   (cs),
      .dec  (sel[r])
    );
    assign wr[r] = sel[r] && we;
  end

  // ---- timer settings ---------------------------------------------------
  logic [TIMER_W-1:0] tov_max, tov_min, tcfs;

  always_ff @(posedge clk or posedge system_reset) begin
    if (system_reset) begin
      tov_max <= TIMER_W'(TOV_RESET);
      tov_min <= TIMER_W'(TOV_RESET);
      tcfs    <= TIMER_W'(TCFS_RESET);
    end else begin
      if (wr[REG_TOV_MAX]) tov_max <= wdata[TIMER_W-1:0];
      if (wr[REG_TOV_MIN]) tov_min <= wdata[TIMER_W-1:0];
      if (wr[REG_TCFS])    tcfs    <= wdata[TIMER_W-1:0];
    end
  end

  // ---- (A) power switches with timers -----------------------------------
  gates_t ps_req, ps_gate;
  logic   ps_pending;

  power_switch_ctrl u_ps (
    .clk          (clk),
    .system_reset (system_reset),
    .dec_ps       (wr[REG_PS]),
    .data         (wdata[1:0]),
    .tov_max      (tov_max),
    .tov_min      (tov_min),
    .req          (ps_req),
    .gate         (ps_gate),
    .pending      (ps_pending)
  );

  assign gate_max_n = ps_gate.max_n;
  assign gate_min_n = ps_gate.min_n;

  power_switch_model u_sw (
    .gate_max_n (ps_gate.max_n),
    .gate_min_n (ps_gate.min_n),
    .vdd_mv     (vdd_mv),
    .overlap    (vdd_overlap),
    .cut_off    (vdd_cut_off)
  );

  // ---- (C) clock frequency selector -------------------------------------
  clk_sel_e cfs_req, cfs_now;
  logic     cfs_pending;

  clock_freq_selector u_cfs (
    .clk          (clk),
    .system_reset (system_reset),
    .dec_cfs      (wr[REG_CFS]),
    .data         (wdata[0]),
    .tcfs         (tcfs),
    .clk_2fmax    (clk_2fmax),
    .sel_req      (cfs_req),
    .sel_timed    (),
    .pending      (cfs_pending),
    .sel_now      (cfs_now),
    .clk_out      (clk_out)
  );

  // ---- timers for the software ------------------------------------------
  logic [TIMER_W-1:0] now, wake_remain;
  logic               wake_busy;

  current_time_timer u_time (
    .clk        (clk),
    .rst        (system_reset),
    .load       (wr[REG_TIME]),
    .load_value (wdata[TIMER_W-1:0]),
    .now        (now)
  );

  wakeup_timer u_wake (
    .clk     (clk),
    .rst     (system_reset),
    .start   (wr[REG_WAKE]),
    .count   (wdata[TIMER_W-1:0]),
    .int_ack (int_ack),
    .int_req (int_req),
    .busy    (wake_busy),
    .remain  (wake_remain)
  );

  // ---- read back --------------------------------------------------------
  always_comb begin
    rdata = '0;
    if (cs && !we) begin
      unique case (1'b1)
        sel[REG_PS]:      rdata = DATA_W'(ps_req);
        sel[REG_CFS]:     rdata = DATA_W'(cfs_req);
        sel[REG_TOV_MAX]: rdata = DATA_W'(tov_max);
        sel[REG_TOV_MIN]: rdata = DATA_W'(tov_min);
        sel[REG_TCFS]:    rdata = DATA_W'(tcfs);
        sel[REG_TIME]:    rdata = DATA_W'(now);
        sel[REG_WAKE]:    rdata = DATA_W'(wake_remain);
        sel[REG_STAT]:    rdata = DATA_W'({cfs_now, 2'b00, ps_gate.min_n, ps_gate.max_n,
                                            ps_pending, cfs_pending, wake_busy, int_req});
        default:          rdata = '0;
      endcase
    end
  end

endmodule
