// hopping_cpu_model: behavioural model of the processor side of a
// VDD-hopping system, for testbenches only.
//
// It plays a processor that runs a frame-synchronous real-time task sliced
// into NSLOT timeslots (an initial slot, macroblock slots and a display
// slot) and talks to the hopping controller only through bus reads and
// writes and the interrupt pair:
//   * at the start of a frame it clears the current-time counter;
//   * before slot i it reads the current time T_ACC and computes the target
//     T_TAR = T_SF - T_ACC - T_TD - T_R(i), where T_R(i) is the summed
//     worst-case time of the slots after i; it runs the slot at fmax/2 if
//     2*T_W(i) (plus T_TD when the speed changes) fits in T_TAR, otherwise
//     at fmax;
//   * to change speed it writes the switch gates and the clock choice
//     (clock down before VDD; VDD up, then the clock after T_UP), starts the
//     wake-up timer and sleeps until the interrupt, acknowledging it;
//   * it executes the slot: a random share (PCT_LO..PCT_HI percent) of the
//     slot's worst case at fmax, doubled at fmax/2;
//   * after the last slot it sleeps on the wake-up timer to the frame end.
// The last frame runs at the worst case (every slot takes its full WCET)
// when LAST_WORST is set.  All times are in controller clock cycles.
//
// It checks, and counts in `checks`/`failures`: the boot state, the current
// time read back against its own cycle count, every deadline, the supply and
// clock after every hop, that VDD is never cut off, that the clock never
// runs at fmax while VDD is at VDDmin, and that every hop overlaps the two
// switches for TOV cycles.  It counts each mechanism and fails any that
// never happened.  It also reports the share of time spent at fmax, at
// fmax/2 and asleep (transitions count as asleep), and the average workload
// these give (fmax share + half the fmax/2 share), which must match the
// work it issued to within the bus overhead.  `done` rises when all frames are over.
module hopping_cpu_model
  import hop_pkg::*;
#(
  parameter logic [15:0] BASE       = 16'h0100,
  parameter int          NSLOT      = 22,
  parameter int          T_SF       = 330_000,
  parameter int          T_TD       = 400,
  parameter int          T_UP       = 200,
  parameter int          T_CFS_DOWN = 8,
  parameter int          WCET_INIT  = 10_000,
  parameter int          WCET_MB    = 14_900,
  parameter int          WCET_DISP  = 20_000,
  parameter int          NFRAME     = 4,
  parameter int          PCT_LO     = 30,
  parameter int          PCT_HI     = 60,
  parameter bit          LAST_WORST = 1'b1,
  parameter int          TOV        = 66
) (
  input  logic        clk,
  input  logic        clk_2fmax,
  input  logic        system_reset,
  output logic        cs,
  output logic        we,
  output logic [15:0] addr,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        int_req,
  output logic        int_ack,
  input  logic        clk_out,
  input  logic        gate_max_n,
  input  logic        gate_min_n,
  input  logic [11:0] vdd_mv,
  input  logic        vdd_overlap,
  input  logic        vdd_cut_off,
  output logic        done,
  output int          checks,
  output int          failures
);

  initial begin
    cs = 1'b0; we = 1'b0; addr = '0; wdata = '0; int_ack = 1'b0; done = 1'b0;
    checks = 0; failures = 0;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- bus -------------------------------------------------
  task automatic bus_write(input reg_e r, input logic [31:0] d);
    @(negedge clk);
    cs = 1'b1; we = 1'b1; addr = BASE | 16'(int'(r) * 4); wdata = d;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
  endtask

  task automatic bus_read(input reg_e r, output logic [31:0] d);
    @(negedge clk);
    cs = 1'b1; we = 1'b0; addr = BASE | 16'(int'(r) * 4);
    #1 d = rdata;
    @(negedge clk);
    cs = 1'b0;
  endtask

  // ---------------- monitors --------------------------------------------
  int n_cut = 0, n_overlap_cycles = 0, n_fast_low = 0, n_overlaps = 0;
  logic ov_prev = 1'b0;
  always @(negedge clk) if (!system_reset) begin
    if (vdd_cut_off) n_cut++;
    if (vdd_overlap) n_overlap_cycles++;
    if (vdd_overlap && !ov_prev) n_overlaps++;
    ov_prev = vdd_overlap;
  end

  // clk_out phase widths in 2*fmax cycles; a phase of one cycle is fmax
  int ph = 0;
  logic co_prev = 1'b0;
  always @(negedge clk_2fmax) if (!system_reset) begin
    if (clk_out == co_prev) ph++;
    else begin
      if (ph == 1 && vdd_mv != 12'd2000) n_fast_low++;
      ph = 1;
    end
    co_prev = clk_out;
  end

  // own cycle count since the last TIME write
  int tb_time = 0;
  always @(posedge clk) tb_time++;

  // ---------------- residency: asleep, running at fmax, at fmax/2 --------
  // mode 0 asleep, 1 running at fmax, 2 running at fmax/2; counted only
  // while frames run.  `work_fmax` sums the work issued, in fmax cycles.
  int  mode = 0;
  bit  in_frames = 1'b0;
  longint cyc_sleep = 0, cyc_fast = 0, cyc_half = 0, work_fmax = 0;
  always @(posedge clk) if (in_frames) begin
    case (mode)
      0: cyc_sleep++;
      1: cyc_fast++;
      default: cyc_half++;
    endcase
  end

  // ---------------- mechanism counters ----------------------------------
  int n_down = 0, n_up = 0, n_wake = 0, n_frame_sleep = 0;
  int n_fast_slots = 0, n_half_slots = 0, n_hold = 0, n_time_reads = 0;

  int t_w [NSLOT];
  int t_r [NSLOT];

  task automatic sleep_until_int();
    int k = 0;
    int prev_mode = mode;
    mode = 0;
    while (!int_req && k < 2 * T_SF) begin @(negedge clk); k++; end
    check(int_req, "wake-up interrupt arrived");
    @(negedge clk); int_ack = 1'b1;
    @(negedge clk); int_ack = 1'b0;
    check(!int_req, "interrupt acknowledged");
    n_wake++;
    mode = prev_mode;
  endtask

  task automatic measure_clock(output int rises);
    logic p;
    rises = 0;
    @(negedge clk_2fmax); p = clk_out;
    repeat (400) begin
      @(negedge clk_2fmax);
      if (clk_out && !p) rises++;
      p = clk_out;
    end
  endtask

  task automatic hop(input bit to_half);
    logic [31:0] st;
    if (to_half) begin
      bus_write(REG_TCFS, 32'(T_CFS_DOWN));
      bus_write(REG_CFS, 32'd1);
      bus_write(REG_PS, 32'b01);
      n_down++;
    end else begin
      bus_write(REG_PS, 32'b10);
      bus_write(REG_TCFS, 32'(T_UP));
      bus_write(REG_CFS, 32'd0);
      n_up++;
    end
    bus_read(REG_STAT, st);
    if (st[2]) n_hold++;
    check(st[2], "clock change held back by its timer");
    bus_write(REG_WAKE, 32'(T_TD - 8));
    sleep_until_int();
    bus_read(REG_STAT, st);
    check(st[8] == to_half, $sformatf("clock choice in effect after hop: %b", st[8]));
    check(st[5:4] == (to_half ? 2'b01 : 2'b10), $sformatf("gates after hop: %b", st[5:4]));
    check(vdd_mv == (to_half ? 12'd1200 : 12'd2000), $sformatf("VDD after hop: %0d mV", vdd_mv));
  endtask

  task automatic run_frame(input int pct_lo, input int pct_hi, inout bit half);
    logic [31:0] t;
    int rises;
    bus_write(REG_TIME, 32'd0);
    tb_time = 0;
    for (int i = 0; i < NSLOT; i++) begin
      int tacc, ttar, tl_half, tl_fast, work;
      bit want_half;
      bus_read(REG_TIME, t);
      n_time_reads++;
      tacc = int'(t);
      check(tacc >= tb_time - 2 && tacc <= tb_time, $sformatf("time read %0d vs %0d", tacc, tb_time));
      ttar    = T_SF - tacc - T_TD - t_r[i];
      tl_half = 2 * t_w[i] + (half ? 0 : T_TD);
      tl_fast = t_w[i] + (half ? T_TD : 0);
      want_half = (tl_half <= ttar);
      check(want_half || tl_fast <= ttar + T_TD, $sformatf("slot %0d still schedulable", i));
      if (want_half != half) begin
        hop(want_half);
        half = want_half;
      end
      mode = half ? 2 : 1;
      work = int'(longint'(t_w[i]) * longint'($urandom_range(pct_lo, pct_hi)) / 100);
      work_fmax += work;
      if (half) begin n_half_slots++; work = 2 * work; end
      else n_fast_slots++;
      measure_clock(rises);
      check(rises == (half ? 100 : 200), $sformatf("slot %0d clock: %0d rises", i, rises));
      repeat (work) @(negedge clk);
    end
    bus_read(REG_TIME, t);
    check(int'(t) <= T_SF, $sformatf("frame done at %0d, deadline %0d", t, T_SF));
    if (int'(t) + 20 < T_SF) begin
      bus_write(REG_WAKE, T_SF - t - 10);
      sleep_until_int();
      n_frame_sleep++;
    end
    bus_read(REG_TIME, t);
    check(int'(t) <= T_SF + 10, "frame boundary kept");
  endtask

  initial begin
    logic [31:0] st;
    int rises;
    bit half = 1'b0;
    for (int i = 0; i < NSLOT; i++) t_w[i] = WCET_MB;
    t_w[0] = WCET_INIT;
    t_w[NSLOT-1] = WCET_DISP;
    for (int i = 0; i < NSLOT; i++) begin
      t_r[i] = 0;
      for (int k = i + 1; k < NSLOT; k++) t_r[i] += t_w[k];
    end

    @(posedge system_reset);
    #1 check(!gate_max_n && gate_min_n && vdd_mv == 12'd2000, "boot on VDDmax");
    @(negedge system_reset);
    bus_read(REG_PS, st);
    check(st[1:0] == 2'b10, "PS reads its reset value");
    bus_read(REG_TOV_MAX, st);
    check(st == TOV, "overlap timer reset value");
    measure_clock(rises);
    check(rises == 200, "fmax after reset");

    mode = 1;
    in_frames = 1'b1;
    for (int f = 0; f < NFRAME; f++) begin
      if (LAST_WORST && f == NFRAME - 1) run_frame(100, 100, half);
      else run_frame(PCT_LO - 10 * (f % 2), PCT_HI + 10 * (f % 3 == 2), half);
    end

    in_frames = 1'b0;
    begin
      longint total;
      real pf, ph2, ps, wl, issued;
      total  = cyc_sleep + cyc_fast + cyc_half;
      pf     = 100.0 * real'(cyc_fast) / real'(total);
      ph2    = 100.0 * real'(cyc_half) / real'(total);
      ps     = 100.0 * real'(cyc_sleep) / real'(total);
      wl     = pf + ph2 / 2.0;
      issued = 100.0 * real'(work_fmax) / real'(total);
      $display("residency: fmax %0.1f %%, fmax/2 %0.1f %%, asleep %0.1f %%; workload from residency %0.1f %%, work issued %0.1f %%",
               pf, ph2, ps, wl, issued);
      // running time is the issued work plus bus and measuring overhead
      check(wl >= issued && wl <= issued + 2.0, "residency accounts for the issued work");
    end
    check(n_cut == 0, $sformatf("VDD cut off for %0d cycles", n_cut));
    check(n_fast_low == 0, $sformatf("%0d fmax clock phases at VDDmin", n_fast_low));
    check(n_overlaps == n_down + n_up, $sformatf("%0d overlaps for %0d hops", n_overlaps, n_down + n_up));
    check(n_overlap_cycles == TOV * (n_down + n_up), "each overlap lasts the programmed time");

    $display("mechanisms: down-hops %0d, up-hops %0d, overlaps %0d, clock hold-backs %0d, wake-ups %0d, frame-end sleeps %0d, fmax slots %0d, fmax/2 slots %0d, time reads %0d",
             n_down, n_up, n_overlaps, n_hold, n_wake, n_frame_sleep, n_fast_slots, n_half_slots, n_time_reads);
    check(n_down > 0, "a hop down happened");
    check(n_up > 0, "a hop up happened");
    check(n_overlaps > 0, "a switch overlap happened");
    check(n_hold > 0, "a clock hold-back happened");
    check(n_wake > 0, "a wake-up interrupt happened");
    check(n_frame_sleep > 0, "an end-of-frame sleep happened");
    check(n_fast_slots > 0, "an fmax slot ran");
    check(n_half_slots > 0, "an fmax/2 slot ran");
    done = 1'b1;
  end

endmodule
