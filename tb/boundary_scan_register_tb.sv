// boundary_scan_register_tb: checks the boundary-scan cells with directly
// driven strobes. Transparent mode passes pins to core and core to pins.
// Capture loads {core_out, pin_in} and shifts it out (input cells first).
// EXTEST drives pin_out from shifted-in data while core_in stays on the
// pins; INTEST drives core_in from shifted-in data while pin_out stays on
// the core. Reset clears the update latches. 30 random rounds.
module boundary_scan_register_tb;
  localparam int NI = 4, NO = 4, N = NI + NO;

  logic tck = 0, rst_n = 1, sel = 0, capture = 0, shift = 0, update = 0;
  logic extest = 0, intest = 0, si = 0, so;
  logic [NI-1:0] pin_in, core_in;
  logic [NO-1:0] core_out, pin_out;
  int checks = 0, failures = 0;

  boundary_scan_register #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] din, dout;
    #1 rst_n = 0; #1 rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      pin_in = NI'($urandom); core_out = NO'($urandom);
      extest = 0; intest = 0; #1;
      check(core_in == pin_in && pin_out == core_out, "transparent");
      din = N'($urandom);
      sel = 1;
      capture = 1; clk(); capture = 0;
      shift = 1;
      // the last cell of the chain is seen first on so
      for (int i = 0; i < N; i++) begin dout[N-1-i] = so; si = din[N-1-i]; clk(); end
      shift = 0;
      update = 1; clk(); update = 0;
      sel = 0;
      check(dout == {core_out, pin_in}, $sformatf("capture %h", dout));
      extest = (r % 2 == 0); intest = !extest; #1;
      if (extest) check(pin_out == din[N-1:NI] && core_in == pin_in, "extest drive");
      else        check(core_in == din[NI-1:0] && pin_out == core_out, "intest drive");
    end
    rst_n = 0; #1;
    extest = 1; intest = 1; #1;
    check(pin_out == '0 && core_in == '0, "reset clears latches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
