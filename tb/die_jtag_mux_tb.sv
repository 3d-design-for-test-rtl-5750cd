// die_jtag_mux_tb: exhaustive check of the die-detection multiplexers over
// all combinations of lower_present, upper_present and keep_local_tdo with
// random pad, TSV and TDO values, against a reference written from the
// selection rules (inputs from the TSVs when a die is below, TDO from the
// die above when one is present unless the die keeps its own TDO).
module die_jtag_mux_tb;
  logic lower_present, upper_present, keep_local_tdo;
  logic pad_trst_n, pad_tck, pad_tms, pad_tdi, pad_tdo;
  logic dn_trst_n, dn_tck, dn_tms, dn_tdi, dn_tdo, up_tdo;
  logic trst_n, tck, tms, tdi, local_tdo;
  int checks = 0, failures = 0;

  die_jtag_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] pads, tsvs, want;
    logic want_tdo;
    for (int i = 0; i < 400; i++) begin
      {lower_present, upper_present, keep_local_tdo} = 3'(i);
      pads = 4'($urandom); tsvs = 4'($urandom);
      {pad_trst_n, pad_tck, pad_tms, pad_tdi} = pads;
      {dn_trst_n, dn_tck, dn_tms, dn_tdi} = tsvs;
      up_tdo = 1'($urandom); local_tdo = 1'($urandom);
      #1;
      want = lower_present ? tsvs : pads;
      if (upper_present && !keep_local_tdo) want_tdo = up_tdo;
      else                                   want_tdo = local_tdo;
      check({trst_n, tck, tms, tdi} == want, "jtag inputs");
      check(pad_tdo == want_tdo && dn_tdo == want_tdo, "tdo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
