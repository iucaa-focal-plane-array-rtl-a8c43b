// tb_clock_steer: for every output mode, single/dual combination and swap
// option, drives random state words and checks each clock set against a
// reference built from the amplifiers each mode reads: a half of the array
// moves towards the register of a reading amplifier, a serial-register half
// moves towards the reading amplifier on its side, and a set is swapped
// exactly when that direction differs from the unmodified clocks' direction.
module tb_clock_steer;
  import ifpac_pkg::*;

  logic [15:0] state;
  logic [3:0]  out_mode;
  logic        line_dual, pixel_dual;
  line_swap_e  line_swap;
  pixel_swap_e pixel_swap;
  logic [3:0]  line_ab, line_cd;
  logic [2:0]  ser_e, ser_f, ser_g, ser_h;
  logic [5:0]  swapped;
  int checks = 0, failures = 0;

  clock_steer dut (.*);

  // amplifiers read by each mode: bit 0 E (LL), 1 F (LR), 2 G (UR), 3 H (UL)
  function automatic logic [3:0] amps(input int m);
    case (m)
      1: return 4'b1000;  2: return 4'b0100;  3: return 4'b0001;  4: return 4'b0010;
      5: return 4'b1100;  6: return 4'b0011;  7: return 4'b0101;  8: return 4'b1010;
      9: return 4'b1111;  default: return 4'b0001;
    endcase
  endfunction

  function automatic logic [3:0] swap4(input logic [3:0] v, input int a, input int b);
    logic [3:0] r; r = v; r[a] = v[b]; r[b] = v[a]; return r;
  endfunction
  function automatic logic [2:0] swap3(input logic [2:0] v, input int a, input int b);
    logic [2:0] r; r = v; r[a] = v[b]; r[b] = v[a]; return r;
  endfunction

  // direction of a serial-register half: 0 left, 1 right
  function automatic logic reg_dir(input logic l_amp, input logic r_amp, input logic other_l,
                                   input logic other_r, input logic is_right_half);
    if (l_amp && r_amp) return is_right_half;
    if (l_amp) return 1'b0;
    if (r_amp) return 1'b1;
    // register not read: moves like the other register
    if (other_l && other_r) return is_right_half;
    if (other_r) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    int la [6] = '{0, 0, 0, 1, 1, 2};
    int lb [6] = '{1, 2, 3, 2, 3, 3};
    int pa [3] = '{0, 0, 1};
    int pb [3] = '{1, 2, 2};
    for (int m = 0; m <= 10; m++)
    for (int d = 0; d < 4; d++)
    for (int ls = 0; ls < 6; ls++)
    for (int ps = 0; ps < 3; ps++)
    for (int n = 0; n < 4; n++) begin
      logic [3:0] a, i, ei_ab, ei_cd;
      logic [2:0] r, er [4];
      logic lo_up, hi_up, nat_hi_up;
      logic [3:0] hdir, hnat;
      out_mode = 4'(m); line_dual = d[0]; pixel_dual = d[1];
      line_swap = line_swap_e'(ls); pixel_swap = pixel_swap_e'(ps);
      state = 16'($urandom);
      #1;
      a = amps(m);
      i = state[3:0]; r = state[6:4];
      lo_up = !(a[0] || a[1]);                  // lower half goes up only if no bottom amp
      hi_up = a[2] || a[3];                     // upper half goes up only if a top amp reads
      nat_hi_up = !line_dual;
      ei_ab = lo_up ? swap4(i, la[ls], lb[ls]) : i;
      ei_cd = (hi_up != nat_hi_up) ? swap4(i, la[ls], lb[ls]) : i;
      hdir[0] = reg_dir(a[0], a[1], a[3], a[2], 1'b0);
      hdir[1] = reg_dir(a[0], a[1], a[3], a[2], 1'b1);
      hdir[2] = reg_dir(a[3], a[2], a[0], a[1], 1'b1);
      hdir[3] = reg_dir(a[3], a[2], a[0], a[1], 1'b0);
      hnat = pixel_dual ? 4'b0000 : 4'b0110;
      for (int q = 0; q < 4; q++)
        er[q] = (hdir[q] != hnat[q]) ? swap3(r, pa[ps], pb[ps]) : r;
      checks++;
      if (line_ab !== ei_ab || line_cd !== ei_cd || ser_e !== er[0] || ser_f !== er[1] ||
          ser_g !== er[2] || ser_h !== er[3]) begin
        failures++;
        if (failures < 10)
          $display("mode %0d dual %0d swaps %0d/%0d state %h: ab %b/%b cd %b/%b e %b/%b f %b/%b g %b/%b h %b/%b",
                   m, d, ls, ps, state, line_ab, ei_ab, line_cd, ei_cd, ser_e, er[0], ser_f, er[1],
                   ser_g, er[2], ser_h, er[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
