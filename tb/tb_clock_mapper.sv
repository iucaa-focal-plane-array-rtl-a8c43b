// tb_clock_mapper: drives random state words and steered clock sets for
// both detectors and checks each of the 32 backplane clocks, in single and
// multi detector mode, against the connector tables written out clock by
// clock, plus the analog-chain controls.
module tb_clock_mapper;
  import ifpac_pkg::*;

  logic             multi_det;
  logic [1:0][15:0] state;
  logic [1:0][3:0]  line_ab, line_cd;
  logic [1:0][2:0]  ser_e, ser_f, ser_g, ser_h;
  logic [31:0]      bp_clk;
  logic [1:0][3:0]  analog;
  int checks = 0, failures = 0;

  clock_mapper dut (.*);

  // expected level of Clock n (1-based)
  function automatic logic expect_clk(input int n, input logic multi);
    logic [15:0] s1, s2;
    s1 = state[0]; s2 = state[1];
    if (!multi) begin
      case (n)
        1: return line_cd[0][0]; 2: return line_cd[0][1]; 3: return line_cd[0][2]; 4: return line_cd[0][3];
        5: return line_ab[0][0]; 6: return line_ab[0][1]; 7: return line_ab[0][2]; 8: return line_ab[0][3];
        9: return ser_e[0][0]; 10: return ser_e[0][1]; 11: return ser_e[0][2];
        12: return ser_f[0][0]; 14: return ser_f[0][1]; 15: return ser_f[0][2];
        16: return ser_g[0][0]; 17: return ser_g[0][1]; 18: return ser_g[0][2];
        19: return ser_h[0][0]; 20: return ser_h[0][1]; 21: return ser_h[0][2];
        22, 23: return s1[7];
        24, 25: return s1[8];
        26, 27: return s1[9];
        28, 29: return s1[10];
        32: return s1[15];
        default: return 1'b0;
      endcase
    end else begin
      case (n)
        1: return line_ab[1][0]; 2: return line_ab[1][1]; 3: return line_ab[1][2]; 4: return line_ab[1][3];
        5: return line_ab[0][0]; 6: return line_ab[0][1]; 7: return line_ab[0][2]; 8: return line_ab[0][3];
        9: return ser_e[0][0]; 10: return ser_e[0][1]; 11: return ser_e[0][2];
        12: return ser_h[0][0]; 14: return ser_h[0][1]; 15: return ser_h[0][2];
        16: return ser_e[1][0]; 17: return ser_e[1][1]; 18: return ser_e[1][2];
        19: return ser_h[1][0]; 20: return ser_h[1][1]; 21: return ser_h[1][2];
        22, 23: return s1[7];
        30, 31: return s2[7];
        24: return s2[8];  25: return s1[8];
        26: return s1[9];  27: return s2[9];
        28: return s1[10]; 29: return s2[10];
        32: return s1[15];
        default: return 1'b0;
      endcase
    end
  endfunction

  initial begin
    for (int it = 0; it < 400; it++) begin
      multi_det = it[0];
      state = {16'($urandom), 16'($urandom)};
      line_ab = 8'($urandom); line_cd = 8'($urandom);
      ser_e = 6'($urandom); ser_f = 6'($urandom); ser_g = 6'($urandom); ser_h = 6'($urandom);
      #1;
      for (int n = 1; n <= 32; n++) begin
        checks++;
        if (bp_clk[n-1] !== expect_clk(n, multi_det)) begin
          failures++;
          if (failures < 10) $display("mode %0d Clock%0d = %b expected %b", multi_det, n, bp_clk[n-1],
                                      expect_clk(n, multi_det));
        end
      end
      checks++;
      if (analog[0] !== {state[0][14], state[0][13], state[0][12], state[0][11]} ||
          analog[1] !== (multi_det ? {state[1][14], state[1][13], state[1][12], state[1][11]}
                                   : {state[0][14], state[0][13], state[0][12], state[0][11]})) begin
        failures++; $display("analog controls wrong");
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
