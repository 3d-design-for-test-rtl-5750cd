// die_detector_tb: checks the die-detection model. A TSV driven high reads
// as present after the buffer delay; a TSV driven low or left floating
// (not driven, pulled down) reads as absent. 40 random cases, each checked
// one time unit before and after the delay.
module die_detector_tb;
  logic tsv_driven = 0, tsv_level = 0, present;
  int checks = 0, failures = 0;

  die_detector #(.BUF_DELAY(3)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic expect_now, expect_prev;
    #10 check(present == 1'b0, "floating at start");
    expect_prev = 1'b0;
    for (int i = 0; i < 40; i++) begin
      tsv_driven = 1'($urandom);
      tsv_level  = 1'($urandom);
      expect_now = tsv_driven & tsv_level;
      #2 check(present == expect_prev, "before delay");
      #2 check(present == expect_now, $sformatf("after delay driven=%b level=%b", tsv_driven, tsv_level));
      #6 expect_prev = expect_now;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
