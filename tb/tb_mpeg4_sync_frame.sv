// tb_mpeg4_sync_frame: the MPEG4 CODEC workload at full scale.
//
// The controller, with every parameter at its default, runs two unscaled
// sync frames of the reference MPEG4 system: 200 ms each (6.6 million cycles
// of the 33 MHz controller clock), 22 timeslots (an initial slot, 20
// macroblocks of an 80x64 image, a display slot), a transition time of
// 200 us (6,600 cycles) per hop and a 100 us (3,300 cycles) VDD rise
// allowance before the clock goes back to fmax.  The slot worst cases sum to
// 6.56 million cycles, just inside the frame.  The first frame uses typical
// data (30-60 % of the worst case per slot), the second the worst case, in
// which every slot must run at fmax.  The processor model
// (hopping_cpu_model) makes the speed decisions and checks the controller;
// the 2*fmax clock runs 12 times faster than the controller clock.
module tb_mpeg4_sync_frame;
  localparam int NFRAME = 2;
  localparam int T_SF   = 6_600_000;

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
    .T_SF (T_SF), .T_TD (6_600), .T_UP (3_300),
    .WCET_INIT (200_000), .WCET_MB (298_000), .WCET_DISP (400_000),
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
