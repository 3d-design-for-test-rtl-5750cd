// tap_controller_tb: drives 2000 random TMS values (and a few TRSTn pulses)
// into the TAP controller and compares the state, the decoded strobes and
// the registered reset_n with a reference table of the IEEE 1149.1 state
// diagram. Also checks that five TMS=1 clocks reach Test-Logic-Reset from
// every state.
module tap_controller_tb;
  import p1687_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state;
  logic reset_n, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  int checks = 0, failures = 0;

  tap_controller dut (.*);

  // reference: next state indexed by {state, tms}
  function automatic int ref_next(int s, logic m);
    int t0[16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
    int t1[16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
    return m ? t1[s] : t0[s];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int model;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #1 trst_n = 0;
    #2 check(state == TEST_LOGIC_RESET, "reset state");
    trst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      if (i % 500 == 250) begin
        trst_n = 0; #1; trst_n = 1; model = 0;
        check(state == TEST_LOGIC_RESET, "async trst");
      end
      tms = (i % 97 < 5) ? 1'b1 : 1'($urandom);
      #5 tck = 1;
      model = ref_next(model, tms);
      #1 check(int'(state) == model, $sformatf("state %0d vs %0d", state, model));
      check(capture_dr == (model == 3) && shift_dr == (model == 4) && update_dr == (model == 8) &&
            capture_ir == (model == 10) && shift_ir == (model == 11) && update_ir == (model == 15),
            "strobes");
      #4 tck = 0;
      #1 check(reset_n == (model != 0), "reset_n");
    end
    // five TMS=1 clocks from any state
    for (int s = 0; s < 20; s++) begin
      tms = 1'($urandom);
      #5 tck = 1; #5 tck = 0;
      tms = 1;
      repeat (5) begin #5 tck = 1; #5 tck = 0; end
      check(state == TEST_LOGIC_RESET, "five TMS=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
