// tb_ifpac_top: end-to-end test of the clock card at reduced size
// (CLKS_PER_MS = 50, small detector geometries). Over the host bus it loads
// the four E2V CCD 4240 example tables into both detectors and runs:
//   A  single detector mode, four outputs, full frame, dark and overscan
//      pixels digitised, one clear + exposure + read;
//   B  single detector mode, lower-left output only, dual-clock detector,
//      ROI readout (line skips by dump, pixel skips by partial-pixel runs,
//      dark pixels skipped), two ramps of two reads;
//   C  single detector mode, upper-right output, single-clock detector:
//      line and pixel clock swaps in use;
//   D  multi detector mode, both detectors exposing and reading at once.
// For each run the table runs and digitised pixels are counted by kind and
// compared with counts worked out from the geometry, the shutter time and
// the read-out time (sum of the table times, to within the sequencing
// latency) are checked, and the backplane clocks are checked every cycle
// for the ganging and swapping the mode implies. Each mechanism (clear,
// exposure, line skip, pixel skip, dark/overscan pixels, swaps, dual clocks,
// multi-ramp, multi detector mode) must occur at least once.
module tb_ifpac_top;
  import ifpac_pkg::*;

  localparam int unsigned CPM = 50;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_det = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0;
  logic [31:0] bp_clk;
  logic [1:0][3:0] analog;
  logic [1:0] shutter, busy, done, pix_strobe, run_accept, underrun;
  logic multi_det;
  logic [1:0][1:0] pix_kind, run_tbl;
  logic [1:0][5:0] swapped;
  int checks = 0, failures = 0;

  ifpac_top #(.CLKS_PER_MS(CPM)) dut (.*);

  always #5 clk = ~clk;

  // ---- the example tables (state, time) ----
  localparam int NL = 7, NP = 14, NQ = 10, ND = 10;
  logic [15:0] t_line [2*NL] = '{16'h48B2,16'h00C8,16'h48B6,16'h0190,16'h48B4,16'h0190,
     16'h48B5,16'h00C8,16'h48B1,16'h0190,16'h48B3,16'h0190,16'h48B2,16'h00C8};
  logic [15:0] t_pix [2*NP] = '{16'h4942,5,16'h5942,5,16'h1942,5,16'h1952,5,16'h1812,5,
     16'h5892,5,16'h5812,5,16'h5032,5,16'h5022,5,16'h1022,5,16'h1062,5,16'h1042,5,
     16'h5042,5,16'h4942,16'h000F};
  logic [15:0] t_part [2*NQ] = '{16'h4942,3,16'h4952,3,16'h4812,6,16'h4892,3,16'h4812,6,
     16'h4832,3,16'h4822,3,16'h4862,3,16'h4842,3,16'h4842,3};
  logic [15:0] t_dump [2*ND] = '{16'h4AB2,16'h00C8,16'h4AB6,16'h00C8,16'h4AB4,16'h00C8,
     16'h4AB5,16'h00C8,16'h4AB1,16'h00C8,16'h4AB3,16'h00C8,16'h4AB2,16'h0190,
     16'h4A82,16'h0190,16'h4882,16'h0190,16'h48B2,16'h00C8};
  int dur [4];

  // ---- monitors ----
  int n_run [2][4];
  int n_pix [2][3];
  int shut_len [2];
  int n_shut [2];
  int mech_clear = 0, mech_expose = 0, mech_line_skip = 0, mech_pix_skip = 0;
  int mech_dark = 0, mech_over = 0, mech_lswap = 0, mech_pswap = 0, mech_dual = 0;
  int mech_ramps = 0, mech_multi = 0, mech_roi = 0;
  bit check_mode9 = 0, check_mode3dual = 0, check_multi = 0;
  logic line_dual_now = 0;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) begin
      if (run_accept[d]) n_run[d][run_tbl[d]]++;
      if (pix_strobe[d]) n_pix[d][pix_kind[d]]++;
      if (shutter[d]) shut_len[d]++;
      if (underrun[d]) begin failures++; $display("det %0d: waveform underrun", d + 1); end
    end
    if (swapped[0][1:0] != 2'b00) mech_lswap++;
    if (swapped[0][5:2] != 4'b0000) mech_pswap++;
    // four outputs, single-clock detector: the unmodified clocks already
    // move each section towards its own amplifier, so no set is swapped
    if (check_mode9) begin
      checks++;
      if (bp_clk[3:0] != bp_clk[7:4] ||
          {bp_clk[14], bp_clk[13], bp_clk[11]} != bp_clk[10:8] ||
          bp_clk[17:15] != bp_clk[10:8] ||
          bp_clk[20:18] != bp_clk[10:8] || bp_clk[21] != bp_clk[22] ||
          bp_clk[23] != bp_clk[24] || bp_clk[25] != bp_clk[26] || bp_clk[27] != bp_clk[28] ||
          bp_clk[12] || bp_clk[29] || bp_clk[30]) begin
        failures++;
        if (failures < 10) $display("mode 9 clocks wrong: %b", bp_clk);
      end
    end
    // lower-left output, dual-clock detector: no set is swapped
    if (check_mode3dual) begin
      checks++;
      if (bp_clk[3:0] != bp_clk[7:4] || {bp_clk[14], bp_clk[13], bp_clk[11]} != bp_clk[10:8] ||
          bp_clk[17:15] != bp_clk[10:8] || bp_clk[20:18] != bp_clk[10:8] ||
          analog[0] != analog[1]) begin
        failures++;
        if (failures < 10) $display("mode 3 dual clocks wrong: %b", bp_clk);
      end
    end
    // multi detector mode: detector 2's clocks sit on their own lines
    if (check_multi) begin
      checks++;
      if (bp_clk[29] != bp_clk[30] || bp_clk[21] != bp_clk[22]) begin
        failures++; $display("multi mode reset-gate copies differ");
      end
    end
  end

  // ---- host bus ----
  task automatic wr(input int det, input int a, input logic [31:0] d);
    @(negedge clk); host_we = 1; host_det = det[0]; host_addr = 16'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic load_tables(input int det);
    for (int i = 0; i < 2*NL; i++) wr(det, 16'h8000 | (0 << 10) | i, t_line[i]);
    for (int i = 0; i < 2*NP; i++) wr(det, 16'h8000 | (1 << 10) | i, t_pix[i]);
    for (int i = 0; i < 2*NQ; i++) wr(det, 16'h8000 | (2 << 10) | i, t_part[i]);
    for (int i = 0; i < 2*ND; i++) wr(det, 16'h8000 | (3 << 10) | i, t_dump[i]);
    wr(det, R_TBL_LEN0 + 0, NL); wr(det, R_TBL_LEN0 + 1, NP);
    wr(det, R_TBL_LEN0 + 2, NQ); wr(det, R_TBL_LEN0 + 3, ND);
  endtask

  typedef struct {
    int pix, lines, dark, over, mode, partial, dark_read, x1, x2, y1, y2;
    int exp_ms, resets, reads, groups, ramps, shutter_en;
  } run_cfg_t;

  task automatic configure(input int det, input run_cfg_t c, input int clktype,
                           input int lsw, input int psw);
    wr(det, R_ACTIVE_PIX, c.pix); wr(det, R_LINES, c.lines);
    wr(det, R_DARK, c.dark); wr(det, R_OVERSCAN, c.over);
    wr(det, R_OUT_MODE, c.mode);
    wr(det, R_FLAGS, c.shutter_en | (c.partial << 1) | (1 << 2) | (c.dark_read << 3));
    wr(det, R_ROI_X1, c.x1); wr(det, R_ROI_X2, c.x2); wr(det, R_ROI_Y1, c.y1); wr(det, R_ROI_Y2, c.y2);
    wr(det, R_EXP_TIME, c.exp_ms);
    wr(det, R_N_RESETS, c.resets); wr(det, R_N_READS, c.reads);
    wr(det, R_N_GROUPS, c.groups); wr(det, R_N_RAMPS, c.ramps);
    wr(det, R_CLKTYPE, clktype); wr(det, R_LINE_SWAP, lsw); wr(det, R_PIX_SWAP, psw);
  endtask

  // expected table-run and pixel counts of a whole exposure sequence
  task automatic expected(input run_cfg_t c, output int er [4], output int ep [3],
                          output int read_cycles);
    int po, lo, x1, x2, y1, y2, roil, roip, frames, pre, post;
    po = (c.mode == 5 || c.mode == 6 || c.mode == 9) ? c.pix / 2 : c.pix;
    lo = (c.mode == 7 || c.mode == 8 || c.mode == 9) ? c.lines / 2 : c.lines;
    if (c.partial) begin
      x1 = c.x1; x2 = (c.x2 < po) ? c.x2 : po - 1; y1 = c.y1; y2 = (c.y2 < lo) ? c.y2 : lo - 1;
    end else begin
      x1 = 0; x2 = po - 1; y1 = 0; y2 = lo - 1;
    end
    roil = y2 - y1 + 1; roip = x2 - x1 + 1;
    pre = x1; post = po - x2 - 1;
    frames = c.ramps * c.reads * c.groups;
    er[TBL_DUMP]    = c.ramps * c.resets * lo + frames * (lo - roil);
    er[TBL_LINE]    = frames * roil;
    er[TBL_PIXEL]   = frames * roil * (roip + c.over + (c.dark_read ? c.dark : 0));
    er[TBL_PARTIAL] = frames * roil * (pre + post + (c.dark_read ? 0 : c.dark));
    ep[PIX_DARK]     = c.dark_read ? frames * roil * c.dark : 0;
    ep[PIX_ACTIVE]   = frames * roil * roip;
    ep[PIX_OVERSCAN] = frames * roil * c.over;
    // one read frame
    read_cycles = (lo - roil) * dur[TBL_DUMP] + roil * (dur[TBL_LINE] +
                  (roip + c.over + (c.dark_read ? c.dark : 0)) * dur[TBL_PIXEL] +
                  (pre + post + (c.dark_read ? 0 : c.dark)) * dur[TBL_PARTIAL]);
  endtask

  task automatic clear_counts();
    for (int d = 0; d < 2; d++) begin
      for (int t = 0; t < 4; t++) n_run[d][t] = 0;
      for (int k = 0; k < 3; k++) n_pix[d][k] = 0;
      shut_len[d] = 0;
    end
  endtask

  task automatic compare(input int d, input run_cfg_t c, input string name);
    int er [4], ep [3], rc;
    expected(c, er, ep, rc);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_run[d][t] != er[t]) begin
        failures++;
        $display("%s det %0d: %s runs %0d expected %0d", name, d + 1, tbl_e'(t), n_run[d][t], er[t]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_pix[d][k] != ep[k]) begin
        failures++;
        $display("%s det %0d: %s pixels %0d expected %0d", name, d + 1, pix_kind_e'(k), n_pix[d][k], ep[k]);
      end
    end
    checks++;
    if (shut_len[d] != (c.shutter_en ? c.ramps * c.exp_ms * int'(CPM) : 0)) begin
      failures++;
      $display("%s det %0d: shutter high %0d cycles", name, d + 1, shut_len[d]);
    end
    if (n_run[d][TBL_DUMP] > 0) mech_clear++;
    if (shut_len[d] > 0) mech_expose++;
    if (c.partial && er[TBL_LINE] < c.ramps * c.reads * c.groups * c.lines) mech_line_skip++;
    if (n_run[d][TBL_PARTIAL] > 0) mech_pix_skip++;
    if (n_pix[d][PIX_DARK] > 0) mech_dark++;
    if (n_pix[d][PIX_OVERSCAN] > 0) mech_over++;
    if (c.ramps > 1) mech_ramps++;
    if (c.partial) mech_roi++;
  endtask

  // time from the end of the exposure to the end of the sequence
  task automatic time_read(input int d, input run_cfg_t c, input string name);
    int er [4], ep [3], rc, t0, t1;
    expected(c, er, ep, rc);
    @(negedge shutter[d]);
    t0 = $time;
    @(posedge done[d]);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 < rc || (t1 - t0) / 10 > rc + 12) begin
      failures++;
      $display("%s: read took %0d cycles, table times add up to %0d", name, (t1 - t0) / 10, rc);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_cfg_t a, b, cc, d2;
    dur[TBL_LINE] = 0; dur[TBL_PIXEL] = 0; dur[TBL_PARTIAL] = 0; dur[TBL_DUMP] = 0;
    for (int i = 0; i < NL; i++) dur[TBL_LINE]    += int'(t_line[2*i+1]);
    for (int i = 0; i < NP; i++) dur[TBL_PIXEL]   += int'(t_pix[2*i+1]);
    for (int i = 0; i < NQ; i++) dur[TBL_PARTIAL] += int'(t_part[2*i+1]);
    for (int i = 0; i < ND; i++) dur[TBL_DUMP]    += int'(t_dump[2*i+1]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_tables(0);
    load_tables(1);

    // ---- A: four outputs, full frame ----
    a = '{pix:12, lines:8, dark:1, over:2, mode:9, partial:0, dark_read:1, x1:0, x2:0, y1:0, y2:0,
          exp_ms:2, resets:1, reads:1, groups:1, ramps:1, shutter_en:1};
    configure(0, a, 0, LSW_1_2, PSW_1_3);
    clear_counts();
    check_mode9 = 1;
    wr(0, R_START, 1);
    time_read(0, a, "A");
    check_mode9 = 0;
    compare(0, a, "A");

    // ---- B: one output, dual clocks, ROI, two ramps ----
    b = '{pix:10, lines:8, dark:1, over:2, mode:3, partial:1, dark_read:0, x1:2, x2:4, y1:1, y2:2,
          exp_ms:1, resets:1, reads:2, groups:1, ramps:2, shutter_en:1};
    configure(0, b, 3, LSW_1_3, PSW_2_3);
    clear_counts();
    @(negedge clk);
    check_mode3dual = 1;
    mech_dual++;
    wr(0, R_START, 1);
    @(posedge done[0]);
    check_mode3dual = 0;
    compare(0, b, "B");

    // ---- C: upper-right output, single clocks: every set swapped ----
    cc = '{pix:6, lines:4, dark:0, over:1, mode:2, partial:0, dark_read:1, x1:0, x2:0, y1:0, y2:0,
           exp_ms:1, resets:1, reads:1, groups:1, ramps:1, shutter_en:0};
    configure(0, cc, 0, LSW_2_4, PSW_1_2);
    clear_counts();
    @(negedge clk);
    checks++;
    if (swapped[0] != 6'b100101) begin failures++; $display("C: swapped sets %b", swapped[0]); end
    wr(0, R_START, 1);
    @(posedge done[0]);
    compare(0, cc, "C");

    // ---- D: multi detector mode, both detectors at once ----
    a.exp_ms = 1;
    d2 = '{pix:8, lines:4, dark:2, over:0, mode:4, partial:0, dark_read:1, x1:0, x2:0, y1:0, y2:0,
           exp_ms:3, resets:2, reads:1, groups:2, ramps:1, shutter_en:1};
    configure(0, a, 0, LSW_1_2, PSW_1_3);
    configure(1, d2, 1, LSW_3_4, PSW_1_2);
    wr(0, R_IFPAC_MODE, 2);
    clear_counts();
    @(negedge clk);
    checks++;
    if (!multi_det) begin failures++; $display("multi detector mode not set"); end
    check_multi = 1;
    @(negedge clk); host_we = 1; host_det = 0; host_addr = 16'(R_START); host_wdata = 1;
    @(negedge clk); host_det = 1;
    @(negedge clk); host_we = 0;
    fork
      @(posedge done[0]);
      @(posedge done[1]);
    join
    check_multi = 0;
    if (busy == 2'b00) mech_multi++;
    compare(0, a, "D");
    compare(1, d2, "D");

    // ---- every mechanism happened ----
    begin
      int m [12];
      string nm [12];
      m = '{mech_clear, mech_expose, mech_line_skip, mech_pix_skip, mech_dark, mech_over,
            mech_lswap, mech_pswap, mech_dual, mech_ramps, mech_multi, mech_roi};
      nm = '{"clear", "exposure", "line skip", "pixel skip", "dark pixels", "overscan",
             "line swap", "pixel swap", "dual clocks", "multi ramp", "multi detector", "ROI"};
      for (int i = 0; i < 12; i++) begin
        checks++;
        $display("mechanism %-15s happened %0d times", nm[i], m[i]);
        if (m[i] == 0) begin failures++; $display("mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
