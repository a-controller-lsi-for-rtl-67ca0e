// tb_vdd_hopping_lsi: end-to-end test of the VDD-hopping controller.
//
// The controller, with every parameter at its default, is driven by the
// processor model (hopping_cpu_model), which runs the slot-by-slot speed
// choice of VDD-hopping over four sync frames of 22 timeslots: three with
// typical data (20-70 % of the worst case per slot) and one worst-case
// frame.  The frame is the 200 ms reference frame scaled down by 20
// (330,000 cycles of the 33 MHz controller clock, transition time 400
// cycles) so that several frames simulate in seconds; tb_mpeg4_sync_frame
// runs the unscaled frame.  The 2*fmax clock runs 12 times faster than the
// controller clock (400 MHz against 33 MHz).
//
// What is checked is listed in hopping_cpu_model: deadlines, supply and
// clock after every hop, no VDD cut-off, no fmax at VDDmin, the 66-cycle
// switch overlap, the current time, and that every mechanism occurred.
module tb_vdd_hopping_lsi;
  localparam int NFRAME = 4;
  localparam int T_SF   = 330_000;

  logic        clk = 1'b0, clk_2fmax = 1'b0, system_reset = 1'b0;
  logic        cs, we;
  logic [15:0] addr;
  logic [31:0] wdata, rdata;
  logic        int_req, int_ack;
  logic        clk_out, gate_max_n, gate_min_n;
  logic [11:0] vdd_mv;
  logic        vdd_overlap, vdd_cut_off;
  logic        done;
  int          checks, failures;

  vdd_hopping_lsi dut (.*);

  hopping_cpu_model #(
    .T_SF (T_SF), .T_TD (400), .T_UP (200),
    .WCET_INIT (10_000), .WCET_MB (14_900), .WCET_DISP (20_000),
    .NFRAME (NFRAME), .PCT_LO (30), .PCT_HI (60)
  ) cpu (.*);

  always #12 clk = ~clk;              // controller clock
  always #1  clk_2fmax = ~clk_2fmax;  // 2*fmax, 12 times faster

  initial begin
    #5  system_reset = 1'b1;
    #50 system_reset = 1'b0;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAME * T_SF + 200_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
