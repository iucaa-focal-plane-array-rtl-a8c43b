// clock_steer: steers one detector's line and serial clocks so that charge
// moves towards the selected output amplifier(s).
//
// The waveform tables are written for the E output (lower-left amplifier).
// The detector has two line-clock sets, A,B for the lower half and C,D for
// the upper half, and four serial-clock sets, E (lower left), F (lower
// right), G (upper right) and H (upper left). For each set this block
// compares the direction the unmodified E clocks move charge in with the
// direction the selected output mode needs, and where they differ it applies
// the configured clock-bit swap (LineClkSwap on I1..I4, PixelClkSwap on
// R1..R3), which reverses the transfer direction.
//
// Unmodified clocks move charge as follows. Single-clock type: lower half
// down, upper half up, E and H left, F and G right, so the same clocks read
// all four outputs. Dual-clock type: every section down and left, towards E.
// Line and pixel clocks have their own single/dual setting.
//
// Output modes (out_mode): 1 upper left (H), 2 upper right (G), 3 lower left
// (E), 4 lower right (F), 5 both top outputs, 6 both bottom outputs,
// 7 lower left + upper right, 8 upper left + lower right, 9 all four. Any
// other value is treated as 3, the native direction of the tables. The
// assignment of A,B to the lower half and the numeric swap encodings are this
// design's choices. Purely combinational.
module clock_steer
  import ifpac_pkg::*;
(
  input  logic [15:0] state,
  input  logic [3:0]  out_mode,
  input  logic        line_dual,
  input  logic        pixel_dual,
  input  line_swap_e  line_swap,
  input  pixel_swap_e pixel_swap,
  output logic [3:0]  line_ab,    // I1..I4 for the lower half
  output logic [3:0]  line_cd,    // I1..I4 for the upper half
  output logic [2:0]  ser_e,      // R1..R3 per serial-register quadrant
  output logic [2:0]  ser_f,
  output logic [2:0]  ser_g,
  output logic [2:0]  ser_h,
  output logic [5:0]  swapped     // {h,g,f,e,cd,ab}: the set is swapped
);

  localparam logic DOWN = 1'b0, UP = 1'b1;
  localparam logic LEFT = 1'b0, RIGHT = 1'b1;

  logic [3:0] i_clk, i_swp;
  logic [2:0] r_clk, r_swp;
  // required directions: {upper, lower} and {h, g, f, e}
  logic       v_lo, v_hi;
  logic [3:0] h_req;
  logic       nat_hi;
  logic [3:0] h_nat;

  assign i_clk = state[S_I1 +: 4];
  assign r_clk = state[S_R1 +: 3];

  // swapped versions of the line and serial clocks
  always_comb begin
    i_swp = i_clk;
    unique case (line_swap)
      LSW_1_2: begin i_swp[0] = i_clk[1]; i_swp[1] = i_clk[0]; end
      LSW_1_3: begin i_swp[0] = i_clk[2]; i_swp[2] = i_clk[0]; end
      LSW_1_4: begin i_swp[0] = i_clk[3]; i_swp[3] = i_clk[0]; end
      LSW_2_3: begin i_swp[1] = i_clk[2]; i_swp[2] = i_clk[1]; end
      LSW_2_4: begin i_swp[1] = i_clk[3]; i_swp[3] = i_clk[1]; end
      LSW_3_4: begin i_swp[2] = i_clk[3]; i_swp[3] = i_clk[2]; end
      default: ;
    endcase
    r_swp = r_clk;
    unique case (pixel_swap)
      PSW_1_2: begin r_swp[0] = r_clk[1]; r_swp[1] = r_clk[0]; end
      PSW_1_3: begin r_swp[0] = r_clk[2]; r_swp[2] = r_clk[0]; end
      PSW_2_3: begin r_swp[1] = r_clk[2]; r_swp[2] = r_clk[1]; end
      default: ;
    endcase
  end

  // direction each section must move charge in, per output mode
  always_comb begin
    unique case (out_mode)
      4'd1:    begin v_lo = UP;   v_hi = UP;   h_req = {LEFT,  LEFT,  LEFT,  LEFT};  end
      4'd2:    begin v_lo = UP;   v_hi = UP;   h_req = {RIGHT, RIGHT, RIGHT, RIGHT}; end
      4'd4:    begin v_lo = DOWN; v_hi = DOWN; h_req = {RIGHT, RIGHT, RIGHT, RIGHT}; end
      4'd5:    begin v_lo = UP;   v_hi = UP;   h_req = {LEFT,  RIGHT, RIGHT, LEFT};  end
      4'd6:    begin v_lo = DOWN; v_hi = DOWN; h_req = {LEFT,  RIGHT, RIGHT, LEFT};  end
      4'd7:    begin v_lo = DOWN; v_hi = UP;   h_req = {RIGHT, RIGHT, LEFT,  LEFT};  end
      4'd8:    begin v_lo = DOWN; v_hi = UP;   h_req = {LEFT,  LEFT,  RIGHT, RIGHT}; end
      4'd9:    begin v_lo = DOWN; v_hi = UP;   h_req = {LEFT,  RIGHT, RIGHT, LEFT};  end
      default: begin v_lo = DOWN; v_hi = DOWN; h_req = {LEFT,  LEFT,  LEFT,  LEFT};  end
    endcase
  end

  // direction of the unmodified (E-output) clocks in each section
  assign nat_hi = line_dual ? DOWN : UP;
  assign h_nat  = pixel_dual ? {LEFT, LEFT, LEFT, LEFT} : {LEFT, RIGHT, RIGHT, LEFT};

  assign swapped[0] = (v_lo != DOWN);
  assign swapped[1] = (v_hi != nat_hi);
  assign swapped[5:2] = h_req ^ h_nat;

  assign line_ab = swapped[0] ? i_swp : i_clk;
  assign line_cd = swapped[1] ? i_swp : i_clk;
  assign ser_e   = swapped[2] ? r_swp : r_clk;
  assign ser_f   = swapped[3] ? r_swp : r_clk;
  assign ser_g   = swapped[4] ? r_swp : r_clk;
  assign ser_h   = swapped[5] ? r_swp : r_clk;

endmodule
