// sib_tb: a SIB guarding a 4-bit test-bench segment register. Checks that a
// closed SIB is a one-bit path with the segment deselected, that shifting a
// 1 and updating opens it (to_sel high), that an open SIB makes the path
// 5 bits long with the segment ahead of the SIB bit, that capture reads back
// the open/closed state, and that the network reset closes it. Then 300
// random scans (random length, data and select) are compared against a
// queue model of the scan path: SIB bit nearest so, the segment behind it
// while open, nothing while the network is deselected.
module sib_tb;
  import p1687_pkg::*;

  logic tck = 0, si = 0, so, to_si, to_sel, from_so, is_open;
  net_ctrl_t ctrl = '{rst_n: 1'b1, sel: 1'b1, default: 1'b0};
  logic [3:0] seg;
  int checks = 0, failures = 0;

  sib dut (.*);

  always_ff @(posedge tck)
    if (to_sel && ctrl.shift) seg <= {to_si, seg[3:1]};
  assign from_so = seg[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask

  // capture, shift n bits of din, update; returns the bits seen on so
  task automatic scan(input logic [15:0] din, input int n, output logic [15:0] dout);
    dout = '0;
    ctrl.capture = 1; clk(); ctrl.capture = 0;
    ctrl.shift = 1;
    for (int i = 0; i < n; i++) begin dout[i] = so; si = din[i]; clk(); end
    ctrl.shift = 0;
    ctrl.update = 1; clk(); ctrl.update = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] o;
    #1 ctrl.rst_n = 0; #1 ctrl.rst_n = 1;
    check(!is_open && !to_sel, "reset closed");
    seg = 4'h0;
    scan(16'h0, 1, o);
    check(o[0] == 1'b0 && !is_open, "closed readback");
    scan(16'h1, 1, o);
    check(is_open && to_sel, "opened");
    // open: path is segment(4) then SIB bit; capture loads SIB bit = 1
    seg = 4'hA;
    scan(16'b0_0110, 5, o);   // keep open? last bit shifted lands in SIB
    check(o[0] == 1'b1 && o[4:1] == 4'hA, $sformatf("open path readout %b", o[4:0]));
    check(seg == 4'b0011, $sformatf("segment loaded %b", seg));
    check(!is_open, "closed by shifting 0 into SIB");
    scan(16'h1, 1, o);
    ctrl.sel = 0; scan(16'h0, 1, o); check(!to_sel, "to_sel low when deselected"); ctrl.sel = 1; #1;
    check(is_open, "deselected SIB holds");
    check(to_sel == 1'b1, "to_sel follows select");
    ctrl.rst_n = 0; #1 check(!is_open, "reset closes"); ctrl.rst_n = 1;
    // random scans against the queue model
    begin
      bit q[$];
      bit exp_open = 1'b0, exp_sh, ok;
      logic [15:0] d;
      int n;
      for (int it = 0; it < 300; it++) begin
        n = 1 + int'($urandom_range(11));
        d = 16'($urandom);
        ctrl.sel = ($urandom_range(3) != 0);
        if (ctrl.sel) begin
          q.delete();
          q.push_back(exp_open);
          if (exp_open) for (int k = 0; k < 4; k++) q.push_back(seg[k]);
        end
        exp_sh = so;
        scan(d, n, o);
        ok = 1'b1;
        if (ctrl.sel) begin
          for (int i = 0; i < n; i++) begin
            if (o[i] != q[0]) ok = 1'b0;
            void'(q.pop_front());
            q.push_back(d[i]);
          end
          exp_open = q[0];
        end else begin
          for (int i = 0; i < n; i++) if (o[i] != exp_sh) ok = 1'b0;
        end
        check(ok && is_open == exp_open && to_sel == (ctrl.sel && exp_open),
              $sformatf("random scan %0d: n=%0d sel=%b out=%b", it, n, ctrl.sel, o));
      end
      ctrl.sel = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
