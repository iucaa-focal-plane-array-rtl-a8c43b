// tb_readout_ctrl: runs clear and read commands for random small detector
// geometries, output modes, ROIs, dark and overscan counts, with a player
// model that accepts requests at random times and stays busy for a while
// after each one. Every table run requested is checked, in order, against a
// reference sequence built from nested loops over lines and pixels; the
// digitised-pixel reports and frame_done (only after the player is idle) are
// checked as well.
module tb_readout_ctrl;
  import ifpac_pkg::*;

  logic clk = 0, rst_n = 0;
  det_cfg_t cfg;
  logic cmd_valid = 0;
  frame_cmd_e cmd = FRM_CLEAR;
  logic cmd_ready, frame_done;
  logic req_valid;
  tbl_e req_tbl;
  logic req_ready = 0;
  logic player_busy = 0;
  logic pix_strobe;
  pix_kind_e pix_kind;
  int checks = 0, failures = 0;

  readout_ctrl dut (.*);

  always #5 clk = ~clk;

  tbl_e      exp_tbl [$];
  pix_kind_e exp_kind [$];
  int        busy_left = 0;
  int        n_req = 0, n_pix = 0;

  // player model
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      n_req++;
      checks++;
      if (exp_tbl.size() == 0) begin
        failures++; $display("unexpected request %s", req_tbl.name());
      end else begin
        tbl_e e;
        e = exp_tbl.pop_front();
        if (req_tbl !== e) begin
          failures++;
          if (failures < 10) $display("request %0d: %s expected %s", n_req, req_tbl.name(), e.name());
        end
      end
      busy_left = $urandom_range(1, 6);
    end else if (busy_left > 0) busy_left--;
    if (pix_strobe) begin
      checks++;
      n_pix++;
      if (exp_kind.size() == 0 || pix_kind !== exp_kind.pop_front()) begin
        failures++; $display("pixel report %0d wrong kind", n_pix);
      end
    end
  end
  always @(negedge clk) begin
    req_ready   <= ($urandom_range(0, 3) != 0);
    player_busy <= (busy_left > 0);
  end

  task automatic build_expected(input frame_cmd_e c);
    int m, po, lo, x1, x2, y1, y2, pre, roi, post;
    m  = int'(cfg.out_mode);
    po = (m == 5 || m == 6 || m == 9) ? int'(cfg.active_pix) / 2 : int'(cfg.active_pix);
    lo = (m == 7 || m == 8 || m == 9) ? int'(cfg.lines) / 2 : int'(cfg.lines);
    if (cfg.frame_partial) begin
      x1 = int'(cfg.roi_x1); x2 = int'(cfg.roi_x2); y1 = int'(cfg.roi_y1); y2 = int'(cfg.roi_y2);
      if (x2 > po - 1) x2 = po - 1;
      if (y2 > lo - 1) y2 = lo - 1;
    end else begin
      x1 = 0; x2 = po - 1; y1 = 0; y2 = lo - 1;
    end
    for (int l = 0; l < lo; l++) begin
      if (c == FRM_CLEAR || l < y1 || l > y2) exp_tbl.push_back(TBL_DUMP);
      else begin
        exp_tbl.push_back(TBL_LINE);
        for (int p = 0; p < int'(cfg.dark_pix); p++) begin
          exp_tbl.push_back(cfg.dark_read ? TBL_PIXEL : TBL_PARTIAL);
          if (cfg.dark_read && cfg.send_adc) exp_kind.push_back(PIX_DARK);
        end
        for (int p = 0; p < po; p++) begin
          if (p >= x1 && p <= x2) begin
            exp_tbl.push_back(TBL_PIXEL);
            if (cfg.send_adc) exp_kind.push_back(PIX_ACTIVE);
          end else exp_tbl.push_back(TBL_PARTIAL);
        end
        for (int p = 0; p < int'(cfg.overscan_pix); p++) begin
          exp_tbl.push_back(TBL_PIXEL);
          if (cfg.send_adc) exp_kind.push_back(PIX_OVERSCAN);
        end
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      cfg.out_mode      = 4'($urandom_range(1, 9));
      cfg.active_pix    = 16'($urandom_range(0, 24));
      cfg.lines         = 16'($urandom_range(1, 12));
      cfg.dark_pix      = 8'($urandom_range(0, 3));
      cfg.overscan_pix  = 8'($urandom_range(0, 3));
      cfg.frame_partial = $urandom_range(0, 1);
      cfg.send_adc      = ($urandom_range(0, 3) != 0);
      cfg.dark_read     = $urandom_range(0, 1);
      cfg.roi_x1        = 16'($urandom_range(0, 8));
      cfg.roi_x2        = 16'($urandom_range(0, 14));
      cfg.roi_y1        = 16'($urandom_range(0, 4));
      cfg.roi_y2        = 16'($urandom_range(0, 8));
      cmd = (f % 3 == 0) ? FRM_CLEAR : FRM_READ;
      build_expected(cmd);
      @(negedge clk);
      checks++;
      if (!cmd_ready) begin failures++; $display("not ready for frame %0d", f); end
      cmd_valid = 1;
      @(negedge clk);
      cmd_valid = 0;
      @(posedge frame_done);
      checks++;
      if (busy_left != 0) begin failures++; $display("frame_done while the player is busy"); end
      @(negedge clk);
      checks++;
      if (exp_tbl.size() != 0 || exp_kind.size() != 0) begin
        failures++; $display("frame %0d: %0d runs, %0d pixel reports missing", f, exp_tbl.size(), exp_kind.size());
        exp_tbl.delete(); exp_kind.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
