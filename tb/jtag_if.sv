// jtag_if: test-bench JTAG driver. Holds the TAP pins and tasks that walk a
// TAP (or a daisy chain of TAPs) through reset, IR scans and DR scans.
// TCK is generated by the tasks themselves: each tick sets TMS/TDI while TCK
// is low, samples TDO just before the rising edge (TDO changes on the falling
// edge), then pulses TCK with a 10-time-unit period. Scans start and end in
// Run-Test/Idle and shift LSB first; the bit read back at position i is the
// bit on TDO before the i-th shift edge. `ticks` counts TCK cycles.
interface jtag_if;
  logic tck = 1'b0;
  logic tms = 1'b1;
  logic tdi = 1'b0;
  logic trst_n = 1'b1;
  logic tdo;
  int unsigned ticks = 0;

  task automatic tick(input logic m, input logic d, output logic o);
    tms = m;
    tdi = d;
    #4;
    o = tdo;
    #1 tck = 1'b1;
    #4 tck = 1'b0;
    #1 ticks++;
  endtask

  task automatic idle(input int n);
    logic o;
    repeat (n) tick(1'b0, 1'b0, o);
  endtask

  // Asynchronous TRSTn pulse, five TMS=1 ticks, then to Run-Test/Idle.
  task automatic reset();
    logic o;
    #1 trst_n = 1'b0;
    #10 trst_n = 1'b1;
    #10;
    repeat (5) tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);
  endtask

  task automatic shift_bits(input logic [255:0] din, input int n, output logic [255:0] dout);
    logic o;
    dout = '0;
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, din[i], o);
      dout[i] = o;
    end
    tick(1'b1, 1'b0, o);  // Exit1 -> Update
    tick(1'b0, 1'b0, o);  // Update -> Run-Test/Idle
  endtask

  task automatic scan_ir(input logic [255:0] din, input int n, output logic [255:0] dout);
    logic o;
    tick(1'b1, 1'b0, o);  // Select-DR
    tick(1'b1, 1'b0, o);  // Select-IR
    tick(1'b0, 1'b0, o);  // Capture-IR
    tick(1'b0, 1'b0, o);  // Shift-IR
    shift_bits(din, n, dout);
  endtask

  task automatic scan_dr(input logic [255:0] din, input int n, output logic [255:0] dout);
    logic o;
    tick(1'b1, 1'b0, o);  // Select-DR
    tick(1'b0, 1'b0, o);  // Capture-DR
    tick(1'b0, 1'b0, o);  // Shift-DR
    shift_bits(din, n, dout);
  endtask
endinterface
