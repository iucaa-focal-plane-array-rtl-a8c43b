// clock_mapper: distributes the detector state registers onto the 32
// backplane clock lines (connector J47) and the analog-board controls.
//
// Single detector mode (multi_det = 0): detector 1 drives all 32 clocks.
// Its two line-clock sets go to Clock1-4 (C,D) and Clock5-8 (A,B); the four
// serial-clock quadrants E, F, G, H go to Clock9-11, 12/14/15, 16-18 and
// 19-21; the reset gate R-phi, SW, DG and TGA each drive two lines
// (Clock22/23, 24/25, 26/27, 28/29) for drive strength.
// Multi detector mode (multi_det = 1): each detector has its own state
// register. Detector 1 drives Clock5-8 (line), 9-11 (serial E,F),
// 12/14/15 (serial G,H), 22/23 (R-phi), 25 (SW), 26 (DG), 28 (TGA);
// detector 2 drives Clock1-4, 16-18, 19-21, 30/31, 24, 27, 29. Line clocks
// of a detector are ganged for all four quadrants, and E,F and G,H share
// serial clocks; they take the A,B line set and the E and H serial sets.
// Clock32 is the EMCCD high-voltage clock of detector 1 in both modes.
// Clock13 and, in single mode, Clock30/31 have no assigned signal and are
// held low. HOLD, CNV, RST and SN go to each detector's analog chain; in
// single mode both chains follow detector 1. The line assignment follows the
// controller's J47 connector tables; the ganging choices in multi mode and
// the constant-low spare lines are this design's. Purely combinational.
//
// bp_clk[k] is Clock(k+1). analog[d] = {HOLD, CNV, RST, SN} of chain d.
module clock_mapper
  import ifpac_pkg::*;
(
  input  logic             multi_det,
  input  logic [1:0][15:0] state,
  input  logic [1:0][3:0]  line_ab,
  input  logic [1:0][3:0]  line_cd,
  input  logic [1:0][2:0]  ser_e,
  input  logic [1:0][2:0]  ser_f,
  input  logic [1:0][2:0]  ser_g,
  input  logic [1:0][2:0]  ser_h,
  output logic [31:0]      bp_clk,
  output logic [1:0][3:0]  analog
);

  // Clock numbers are 1-based as printed on the connector table
  function automatic int unsigned c(input int unsigned n);
    return n - 1;
  endfunction

  logic rg1, rg2, sw1, sw2, dg1, dg2, tg1, tg2;
  assign rg1 = state[0][S_RG];  assign rg2 = state[1][S_RG];
  assign sw1 = state[0][S_SW];  assign sw2 = state[1][S_SW];
  assign dg1 = state[0][S_DG];  assign dg2 = state[1][S_DG];
  assign tg1 = state[0][S_TGA]; assign tg2 = state[1][S_TGA];

  always_comb begin
    bp_clk = '0;
    if (!multi_det) begin
      for (int unsigned k = 0; k < 4; k++) begin
        bp_clk[c(1 + k)] = line_cd[0][k];
        bp_clk[c(5 + k)] = line_ab[0][k];
      end
      for (int unsigned k = 0; k < 3; k++) begin
        bp_clk[c(9 + k)]  = ser_e[0][k];
        bp_clk[c(16 + k)] = ser_g[0][k];
        bp_clk[c(19 + k)] = ser_h[0][k];
      end
      bp_clk[c(12)] = ser_f[0][0];
      bp_clk[c(14)] = ser_f[0][1];
      bp_clk[c(15)] = ser_f[0][2];
      bp_clk[c(22)] = rg1;  bp_clk[c(23)] = rg1;
      bp_clk[c(24)] = sw1;  bp_clk[c(25)] = sw1;
      bp_clk[c(26)] = dg1;  bp_clk[c(27)] = dg1;
      bp_clk[c(28)] = tg1;  bp_clk[c(29)] = tg1;
    end else begin
      for (int unsigned k = 0; k < 4; k++) begin
        bp_clk[c(1 + k)] = line_ab[1][k];
        bp_clk[c(5 + k)] = line_ab[0][k];
      end
      for (int unsigned k = 0; k < 3; k++) begin
        bp_clk[c(9 + k)]  = ser_e[0][k];
        bp_clk[c(16 + k)] = ser_e[1][k];
        bp_clk[c(19 + k)] = ser_h[1][k];
      end
      bp_clk[c(12)] = ser_h[0][0];
      bp_clk[c(14)] = ser_h[0][1];
      bp_clk[c(15)] = ser_h[0][2];
      bp_clk[c(22)] = rg1;  bp_clk[c(23)] = rg1;
      bp_clk[c(30)] = rg2;  bp_clk[c(31)] = rg2;
      bp_clk[c(24)] = sw2;  bp_clk[c(25)] = sw1;
      bp_clk[c(26)] = dg1;  bp_clk[c(27)] = dg2;
      bp_clk[c(28)] = tg1;  bp_clk[c(29)] = tg2;
    end
    bp_clk[c(32)] = state[0][S_EMR];
  end

  always_comb begin
    analog[0] = {state[0][S_HOLD], state[0][S_CNV], state[0][S_RST], state[0][S_SN]};
    analog[1] = multi_det ? {state[1][S_HOLD], state[1][S_CNV], state[1][S_RST], state[1][S_SN]}
                          : analog[0];
  end

endmodule
