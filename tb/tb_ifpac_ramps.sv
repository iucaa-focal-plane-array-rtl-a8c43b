// tb_ifpac_ramps: the "multiple exposures for CCD" workload: NResets = 1,
// NReads = 1, NGroups = 1, NRamps = 100, i.e. one hundred clear / expose /
// read sequences in one start. Run on a small detector (8 x 4 pixels, one
// output, 5 dark and 5 overscan pixels) with CLKS_PER_MS reduced to 20 so
// that it simulates in seconds. Checks that the shutter opens 100 times for
// ExpTime each, that 100 frames are read (100 x 4 line transfers and
// 100 x 4 x 18 digitised pixels) and that 100 x 4 clear dumps are made.
module tb_ifpac_ramps;
  import ifpac_pkg::*;

  localparam int unsigned CPM = 20;
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

  int n_run [4];
  int n_pix = 0, n_open = 0, shut_len = 0;
  logic shut_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (run_accept[0]) n_run[run_tbl[0]]++;
    if (pix_strobe[0]) n_pix++;
    if (shutter[0]) shut_len++;
    if (shutter[0] && !shut_q) n_open++;
    shut_q <= shutter[0];
    if (underrun[0]) begin failures++; $display("waveform underrun"); end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); host_we = 1; host_det = 0; host_addr = 16'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic check(input string what, input int got, input int expv);
    checks++;
    if (got != expv) begin failures++; $display("%s: %0d, expected %0d", what, got, expv); end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) n_run[t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2*NL; i++) wr(16'h8000 | (0 << 10) | i, t_line[i]);
    for (int i = 0; i < 2*NP; i++) wr(16'h8000 | (1 << 10) | i, t_pix[i]);
    for (int i = 0; i < 2*NQ; i++) wr(16'h8000 | (2 << 10) | i, t_part[i]);
    for (int i = 0; i < 2*ND; i++) wr(16'h8000 | (3 << 10) | i, t_dump[i]);
    wr(R_TBL_LEN0 + 0, NL); wr(R_TBL_LEN0 + 1, NP);
    wr(R_TBL_LEN0 + 2, NQ); wr(R_TBL_LEN0 + 3, ND);
    wr(R_ACTIVE_PIX, 8); wr(R_LINES, 4); wr(R_OUT_MODE, 3);
    wr(R_EXP_TIME, 3); wr(R_N_RAMPS, 100);
    wr(R_START, 1);
    @(posedge done[0]);
    check("shutter openings", n_open, 100);
    check("shutter cycles", shut_len, 100 * 3 * int'(CPM));
    check("clear dumps", n_run[TBL_DUMP], 100 * 4);
    check("line transfers", n_run[TBL_LINE], 100 * 4);
    check("pixel transfers", n_run[TBL_PIXEL], 100 * 4 * (5 + 8 + 5));
    check("digitised pixels", n_pix, 100 * 4 * (5 + 8 + 5));
    check("partial pixels", n_run[TBL_PARTIAL], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
