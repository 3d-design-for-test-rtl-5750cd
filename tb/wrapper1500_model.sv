// wrapper1500_model: behavioural model of a die wrapped by an IEEE 1500
// wrapper (the top die of the interposer test case), for test benches only.
// A 3-bit wrapper instruction register (WIR, captures 001) and two data
// registers: WBY (1 bit, WIR = 000 and any unknown code) and an 8-bit core
// test register (WIR = 001) whose capture returns the bitwise inverse of
// the last updated value rotated left by one, standing in for a core
// response. Shift and capture on the rising WRCK edge, update on the
// falling edge, WRSTn resets the WIR and the core register.
module wrapper1500_model
  import p1687_pkg::*;
(
  input  wsp_t wsp,
  output logic wso,
  output logic [2:0] wir,
  output logic [7:0] core_reg
);
  logic [2:0] wir_sh;
  logic [7:0] wdr_sh;
  logic       wby;

  always_ff @(posedge wsp.wrck) begin
    if (wsp.select_wir) begin
      if (wsp.capture_wr)    wir_sh <= 3'b001;
      else if (wsp.shift_wr) wir_sh <= {wsp.wsi, wir_sh[2:1]};
    end else if (wir == 3'b001) begin
      if (wsp.capture_wr)    wdr_sh <= ~{core_reg[6:0], core_reg[7]};
      else if (wsp.shift_wr) wdr_sh <= {wsp.wsi, wdr_sh[7:1]};
    end else begin
      if (wsp.capture_wr)    wby <= 1'b0;
      else if (wsp.shift_wr) wby <= wsp.wsi;
    end
  end

  always_ff @(negedge wsp.wrck or negedge wsp.wrst_n)
    if (!wsp.wrst_n) begin
      wir      <= 3'b000;
      core_reg <= 8'h00;
    end else if (wsp.update_wr) begin
      if (wsp.select_wir)       wir      <= wir_sh;
      else if (wir == 3'b001)   core_reg <= wdr_sh;
    end

  assign wso = wsp.select_wir ? wir_sh[0] : (wir == 3'b001) ? wdr_sh[0] : wby;
endmodule
