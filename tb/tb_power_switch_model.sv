// tb_power_switch_model: self-checking test of the power-switch model.
// Drives all four gate combinations and checks the VDD level (2000 mV with
// the VDDmax switch on, 1200 mV with only the VDDmin switch on, 0 mV cut
// off) and the overlap and cut-off flags, after the switching delay and not
// before it.
module tb_power_switch_model;
  logic        gate_max_n = 1'b0, gate_min_n = 1'b1;
  logic [11:0] vdd_mv;
  logic        overlap, cut_off;
  int checks = 0, failures = 0;

  power_switch_model #(.T_SWITCH(5)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input logic mx, input logic mn,
                       input int mv, input bit ov, input bit co);
    logic [11:0] prev_mv;
    #10;
    prev_mv = vdd_mv;
    gate_max_n = mx; gate_min_n = mn;
    #2 check(vdd_mv == prev_mv, "level holds during the switching delay");
    #6;
    check(vdd_mv == 12'(mv), $sformatf("gates %b%b: %0d mV, expected %0d", mx, mn, vdd_mv, mv));
    check(overlap == ov, $sformatf("gates %b%b: overlap flag", mx, mn));
    check(cut_off == co, $sformatf("gates %b%b: cut-off flag", mx, mn));
  endtask

  initial begin
    apply(1'b0, 1'b1, 2000, 0, 0);
    apply(1'b0, 1'b0, 2000, 1, 0);
    apply(1'b1, 1'b0, 1200, 0, 0);
    apply(1'b0, 1'b0, 2000, 1, 0);
    apply(1'b1, 1'b1,    0, 0, 1);
    apply(1'b1, 1'b0, 1200, 0, 0);
    apply(1'b0, 1'b1, 2000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
