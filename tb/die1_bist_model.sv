// die1_bist_model: behavioural model of the bottom-right die of the
// interposer test case, for test benches only: a self test started by its
// static test signals. While Tst Enable is high, a rising Tst Start runs a
// test of RUN_CYCLES clocks; Tst Result goes high at the end if the die is
// good (input `good`). Result clears when Enable drops. `runs` counts
// completed tests.
module die1_bist_model #(
  parameter int RUN_CYCLES = 20
) (
  input  logic clk,
  input  logic good,
  input  logic tst_start,
  input  logic tst_enable,
  output logic tst_result,
  output int   runs
);
  logic start_q = 1'b0;
  int   count = 0;
  initial begin tst_result = 1'b0; runs = 0; end

  always @(posedge clk) begin
    start_q <= tst_start;
    if (!tst_enable) begin
      tst_result <= 1'b0;
      count      <= 0;
    end else if (tst_start && !start_q) begin
      tst_result <= 1'b0;
      count      <= RUN_CYCLES;
    end else if (count > 1) begin
      count <= count - 1;
    end else if (count == 1) begin
      count      <= 0;
      tst_result <= good;
      runs       <= runs + 1;
    end
  end
endmodule
