// clock_freq_selector: supplies the processor clock, fmax or fmax/2.
//
// For processors without an on-chip frequency control register the
// controller generates the two clocks itself from an external clock at
// 2*fmax (clk_2fmax): one toggle stage gives fmax and a second, chained
// stage gives fmax/2, as in the published schematic.  Software chooses the
// frequency by writing Data[0] under the decoded strobe "Dec cfs" (0 = fmax,
// 1 = fmax/2); the system reset selects fmax, matching the VDDmax supply the
// processor boots on.  A programmable timer holds the new choice back for
// `tcfs` controller clock cycles, so that the processor, which goes to sleep
// right after the write, is halted when its clock changes.
//
// The timed choice crosses into the clk_2fmax domain through two flip-flops
// and takes effect only at the edge where both divided clocks fall together
// (divider count 3 -> 0).  The output is registered on clk_2fmax, so it
// never carries a pulse shorter than half an fmax period.  The
// synchroniser, the switching point and the registered output are this
// design's own; the source shows the flops, the timer and the multiplexer.
//
// Timing: the choice written at controller edge E is taken over at edge
// E+tcfs (E+1 for tcfs = 0 or 1); from there it takes two to three
// clk_2fmax cycles to synchronise plus up to four to reach the switching
// point.  clk_out is fmax (period 2 clk_2fmax cycles) or fmax/2 (period 4).
module clock_freq_selector
  import hop_pkg::*;
#(
  parameter int unsigned TIMER_BITS = hop_pkg::TIMER_W
) (
  input  logic                  clk,           // controller clock
  input  logic                  system_reset,  // asynchronous, active high
  input  logic                  dec_cfs,       // write strobe from the decoder
  input  logic                  data,          // Data[0]
  input  logic [TIMER_BITS-1:0] tcfs,          // hold-back time, clk cycles
  input  logic                  clk_2fmax,     // Clock ext, 2*fmax
  output clk_sel_e              sel_req,       // last written choice
  output clk_sel_e              sel_timed,     // choice after the timer
  output logic                  pending,       // timer running
  output clk_sel_e              sel_now,       // choice in effect (clk domain)
  output logic                  clk_out        // fmax or fmax/2
);

  logic expire;

  // Data flop, cleared by the system reset (fmax).
  always_ff @(posedge clk or posedge system_reset) begin
    if (system_reset) sel_req <= CLK_FMAX;
    else if (dec_cfs) sel_req <= clk_sel_e'(data);
  end

  prog_timer #(.W(TIMER_BITS)) u_timer (
    .clk    (clk),
    .rst    (system_reset),
    .start  (dec_cfs),
    .count  (tcfs),
    .cancel (1'b0),
    .busy   (pending),
    .expire (expire),
    .remain ()
  );

  always_ff @(posedge clk or posedge system_reset) begin
    if (system_reset)           sel_timed <= CLK_FMAX;
    else if (expire && !dec_cfs) sel_timed <= sel_req;
  end

  // ---- clk_2fmax domain ----------------------------------------------
  logic       sync1, sync2;
  logic [1:0] div;        // div[0]: fmax, div[1]: fmax/2
  clk_sel_e   sel_eff;

  always_ff @(posedge clk_2fmax or posedge system_reset) begin
    if (system_reset) begin
      sync1   <= 1'b0;
      sync2   <= 1'b0;
      div     <= 2'b00;
      sel_eff <= CLK_FMAX;
      clk_out <= 1'b0;
    end else begin
      sync1 <= sel_timed;
      sync2 <= sync1;
      div   <= div + 2'd1;
      if (div == 2'b11) sel_eff <= clk_sel_e'(sync2);
      clk_out <= (sel_eff == CLK_FHALF) ? div[1] : div[0];
    end
  end

  // ---- back to the controller clock, for status reads ------------------
  logic back1, back2;
  always_ff @(posedge clk or posedge system_reset) begin
    if (system_reset) begin
      back1 <= 1'b0;
      back2 <= 1'b0;
    end else begin
      back1 <= sel_eff;
      back2 <= back1;
    end
  end
  assign sel_now = clk_sel_e'(back2);

endmodule
