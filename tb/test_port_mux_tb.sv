// test_port_mux_tb: checks the test-port selection of a die on the
// interposer: with the detection line driven high (die mounted, after the
// detector delay) the core gets the interposer inputs, otherwise its pads;
// the core outputs reach both the pads and the interposer.
module test_port_mux_tb;
  localparam int WI = 7, WO = 1;
  logic det_driven = 0, det_level = 1, mounted;
  logic [WI-1:0] pad_in, ip_in, core_in;
  logic [WO-1:0] core_out, pad_out, ip_out;
  int checks = 0, failures = 0;

  test_port_mux #(.W_IN(WI), .W_OUT(WO)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      det_driven = 1'($urandom);
      det_level  = 1'($urandom);
      pad_in = WI'($urandom); ip_in = WI'($urandom); core_out = WO'($urandom);
      #5;
      check(mounted == (det_driven & det_level), "detect");
      check(core_in == ((det_driven & det_level) ? ip_in : pad_in), "input select");
      check(pad_out == core_out && ip_out == core_out, "outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
