// tb_exposure_seq: runs exposure sequences with random NResets, NReads,
// NGroups, NRamps, ExpTime and ShutterEnable against a readout model that
// takes frame commands and finishes frames after random delays. The order of
// clear frames, exposures and read frames is checked against a reference
// built from the sequence definition, and each exposure's shutter time is
// checked to the cycle (ExpTime x CLKS_PER_MS, with CLKS_PER_MS reduced to 10).
module tb_exposure_seq;
  import ifpac_pkg::*;

  localparam int unsigned CPM = 10;
  logic clk = 0, rst_n = 0;
  det_cfg_t cfg;
  logic start = 0, busy, done;
  logic cmd_valid;
  frame_cmd_e cmd;
  logic cmd_ready = 0, frame_done = 0;
  logic shutter, exposing;
  int checks = 0, failures = 0;

  exposure_seq #(.CLKS_PER_MS(CPM)) dut (.*);

  always #5 clk = ~clk;

  // observed events: 0 clear, 1 read, 2 exposure (with its length)
  int ev [$];
  int ev_len [$];
  int exp_len = 0, exp_idx = 0;
  bit in_exp = 0, saw_shutter = 0;

  always @(posedge clk) if (rst_n) begin
    if (exposing) begin
      if (!in_exp) begin ev.push_back(2); ev_len.push_back(0); exp_idx = ev.size() - 1; end
      exp_len++; in_exp = 1; if (shutter) saw_shutter = 1;
    end else if (in_exp) begin
      ev_len[exp_idx] = exp_len;
      checks++;
      if (saw_shutter != cfg.shutter_en) begin failures++; $display("shutter line %b with enable %b", saw_shutter, cfg.shutter_en); end
      exp_len = 0; in_exp = 0; saw_shutter = 0;
    end
    if (!exposing && shutter) begin failures++; $display("shutter high outside the exposure"); end
  end

  // readout model
  initial begin
    forever begin
      @(negedge clk);
      cmd_ready = 1;
      @(posedge clk);
      if (cmd_valid) begin
        int d;
        ev.push_back(cmd == FRM_READ ? 1 : 0); ev_len.push_back(0);
        #1 cmd_ready = 0;
        d = $urandom_range(1, 20);
        repeat (d) @(negedge clk);
        frame_done = 1;
        @(negedge clk) frame_done = 0;
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int rs, rd, gp, rp, et;
      int xev [$];
      int xlen [$];
      xev.delete(); xlen.delete();
      rs = $urandom_range(0, 3); rd = $urandom_range(0, 3);
      gp = $urandom_range(0, 2); rp = $urandom_range(0, 3);
      et = (t == 0) ? 72 : $urandom_range(0, 30);
      cfg.n_resets = 16'(rs); cfg.n_reads = 16'(rd); cfg.n_groups = 16'(gp); cfg.n_ramps = 16'(rp);
      cfg.exp_time_ms = 26'(et); cfg.shutter_en = $urandom_range(0, 1);
      if (rd == 0) rd = 1;
      if (gp == 0) gp = 1;
      if (rp == 0) rp = 1;
      for (int r = 0; r < rp; r++) begin
        for (int k = 0; k < rs; k++) begin xev.push_back(0); xlen.push_back(0); end
        if (et > 0) begin xev.push_back(2); xlen.push_back(et * int'(CPM)); end
        for (int k = 0; k < rd * gp; k++) begin xev.push_back(1); xlen.push_back(0); end
      end
      ev.delete(); ev_len.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) begin failures++; $display("not busy after start"); end
      @(posedge done);
      repeat (2) @(posedge clk);
      checks++;
      if (ev.size() != xev.size()) begin
        failures++;
        $display("test %0d: %0d events, expected %0d", t, ev.size(), xev.size());
      end
      for (int i = 0; i < ev.size() && i < xev.size(); i++) begin
        checks++;
        if (ev[i] != xev[i] || ev_len[i] != xlen[i]) begin
          failures++;
          $display("test %0d event %0d: %0d/%0d expected %0d/%0d", t, i, ev[i], ev_len[i], xev[i], xlen[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
