// tb_param_regs: checks the reset values against the example parameter
// file, then writes random values to every register and checks the
// corresponding configuration field, the table-length registers, the
// table-memory write pass-through and the one-cycle START pulse.
module tb_param_regs;
  import ifpac_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0;
  det_cfg_t cfg;
  logic [3:0][9:0] tbl_len;
  logic start, tbl_we;
  tbl_e tbl_sel;
  logic [9:0] tbl_waddr;
  logic [15:0] tbl_wdata;
  int checks = 0, failures = 0;
  int n_start = 0;

  param_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) n_start++;

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin failures++; $display("%s: got %0d expected %0d", what, got, expv); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = 16'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset active_pix", cfg.active_pix, 4096);
    check("reset lines", cfg.lines, 4096);
    check("reset dark", cfg.dark_pix, 5);
    check("reset overscan", cfg.overscan_pix, 5);
    check("reset out_mode", cfg.out_mode, 9);
    check("reset exp_time", cfg.exp_time_ms, 72);
    check("reset shutter_en", cfg.shutter_en, 1);
    check("reset partial", cfg.frame_partial, 0);
    check("reset resets/reads", {cfg.n_resets, cfg.n_reads}, {16'd1, 16'd1});
    check("reset multi", cfg.multi_det, 0);
    for (int it = 0; it < 20; it++) begin
      logic [31:0] d;
      d = $urandom;
      wr(R_ACTIVE_PIX, d); check("active_pix", cfg.active_pix, d[15:0]);
      wr(R_LINES, d ^ 32'h5a5a); check("lines", cfg.lines, d[15:0] ^ 16'h5a5a);
      wr(R_DARK, d); check("dark", cfg.dark_pix, d[7:0]);
      wr(R_OVERSCAN, d >> 8); check("overscan", cfg.overscan_pix, d[15:8]);
      wr(R_CLKTYPE, d); check("clktype", {cfg.pixel_dual, cfg.line_dual}, d[1:0]);
      wr(R_LINE_SWAP, d % 6); check("line swap", cfg.line_swap, d % 6);
      wr(R_PIX_SWAP, d % 3); check("pixel swap", cfg.pixel_swap, d % 3);
      wr(R_OUT_MODE, 1 + d % 9); check("out mode", cfg.out_mode, 1 + d % 9);
      wr(R_FLAGS, d); check("flags", {cfg.dark_read, cfg.send_adc, cfg.frame_partial, cfg.shutter_en}, d[3:0]);
      wr(R_ROI_X1, d + 1); check("x1", cfg.roi_x1, 16'(d + 1));
      wr(R_ROI_X2, d + 2); check("x2", cfg.roi_x2, 16'(d + 2));
      wr(R_ROI_Y1, d + 3); check("y1", cfg.roi_y1, 16'(d + 3));
      wr(R_ROI_Y2, d + 4); check("y2", cfg.roi_y2, 16'(d + 4));
      wr(R_EXP_TIME, d); check("exptime", cfg.exp_time_ms, d[25:0]);
      wr(R_N_RESETS, d + 5); check("nresets", cfg.n_resets, 16'(d + 5));
      wr(R_N_READS, d + 6); check("nreads", cfg.n_reads, 16'(d + 6));
      wr(R_N_GROUPS, d + 7); check("ngroups", cfg.n_groups, 16'(d + 7));
      wr(R_N_RAMPS, d + 8); check("nramps", cfg.n_ramps, 16'(d + 8));
      wr(R_IFPAC_MODE, 2); check("mode multi", cfg.multi_det, 1);
      wr(R_IFPAC_MODE, 1); check("mode single", cfg.multi_det, 0);
      for (int t = 0; t < 4; t++) begin
        wr(20 + t, (d >> t) % 513); check("table length", tbl_len[t], (d >> t) % 513);
      end
      // table memory writes pass straight through
      @(negedge clk); host_we = 1; host_addr = 16'h8000 | 16'(d[11:0]); host_wdata = d;
      #1;
      checks++;
      if (!tbl_we || tbl_sel != tbl_e'(d[11:10]) || tbl_waddr != d[9:0] || tbl_wdata != d[15:0]) begin
        failures++; $display("table write pass-through wrong");
      end
      @(negedge clk); host_we = 0;
      #1 check("no table write when idle", tbl_we, 0);
    end
    // START pulses once per write of 1
    wr(R_START, 1); wr(R_START, 0); wr(R_START, 1);
    repeat (2) @(negedge clk);
    check("start pulses", n_start, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
