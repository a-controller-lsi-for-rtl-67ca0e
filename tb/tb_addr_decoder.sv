// tb_addr_decoder: self-checking test of the all-purpose decoder.
// Two decoder instances (an exact 16-bit match and a match that ignores the
// two byte-lane bits) are driven with every address of a window around the
// pattern with every address one bit away from each pattern and with random
// addresses; the strobe is compared with an
// independent reference written as a field comparison.
module tb_addr_decoder;
  logic [15:0] addr = '0;
  logic        en = 1'b0;
  logic        dec_exact, dec_word;
  int checks = 0, failures = 0;

  addr_decoder #(.ADDR_W(16), .MATCH(16'h0104), .DONT_CARE(16'h0000))
    u_exact (.addr(addr), .en(en), .dec(dec_exact));
  addr_decoder #(.ADDR_W(16), .MATCH(16'h0110), .DONT_CARE(16'h0003))
    u_word  (.addr(addr), .en(en), .dec(dec_word));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic probe(input logic [15:0] a, input logic e);
    bit exp_exact, exp_word;
    addr = a; en = e;
    #1;
    exp_exact = e && (a == 16'h0104);
    exp_word  = e && (a[15:2] == 14'h0044);
    check(dec_exact == exp_exact, $sformatf("exact a=%h en=%b", a, e));
    check(dec_word  == exp_word,  $sformatf("word a=%h en=%b", a, e));
  endtask

  initial begin
    int hits = 0;
    for (int a = 16'h00F0; a < 16'h0130; a++) begin
      probe(16'(a), 1'b1);
      hits += int'(dec_word) + int'(dec_exact);
      probe(16'(a), 1'b0);
    end
    check(hits == 5, $sformatf("strobes in window %0d, expected 5", hits));
    // every single-bit difference from each pattern must miss
    for (int b = 0; b < 16; b++) begin
      probe(16'h0104 ^ (16'd1 << b), 1'b1);
      probe(16'h0110 ^ (16'd1 << b), 1'b1);
    end
    repeat (2000) probe(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
