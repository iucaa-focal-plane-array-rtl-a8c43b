// tb_ifpac_full: one complete exposure on the clock card at its default
// parameters (100 MHz clock, 1 K word tables) and the example parameter
// file's detector: 4096 x 4096 pixels read through four outputs, 5 dark and
// 5 overscan pixels per output, ExpTime 72 ms, shutter enabled, one reset
// frame and one read frame. The read is a partial-frame ROI of 4 lines x 64
// pixels per output, so the other 2044 lines of each output section are
// skipped with the line-dump table and the other pixels of each ROI line
// with the partial-pixel table. The E2V CCD 4240 example tables are loaded
// over the host bus. Checked: the number of runs of each table and of
// digitised pixels of each kind, the shutter time to the cycle
// (72 x 100000 cycles), and the read-out time against the sum of the table
// times.
module tb_ifpac_full;
  import ifpac_pkg::*;

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

  ifpac_top dut (.*);

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

  longint n_run [4];
  longint n_pix [3];
  longint shut_len = 0;

  always @(posedge clk) if (rst_n) begin
    if (run_accept[0]) n_run[run_tbl[0]]++;
    if (pix_strobe[0]) n_pix[pix_kind[0]]++;
    if (shutter[0]) shut_len++;
    if (underrun[0]) begin failures++; $display("waveform underrun"); end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); host_we = 1; host_det = 0; host_addr = 16'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin failures++; $display("%s: %0d, expected %0d", what, got, expv); end
    else $display("%s: %0d", what, got);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dl = 0, dp = 0, dq = 0, dd = 0, t0, t1, rc;
    for (int i = 0; i < NL; i++) dl += t_line[2*i+1];
    for (int i = 0; i < NP; i++) dp += t_pix[2*i+1];
    for (int i = 0; i < NQ; i++) dq += t_part[2*i+1];
    for (int i = 0; i < ND; i++) dd += t_dump[2*i+1];
    // table lengths as drawn: 22 us line transfer, 26 us line dump, 360 ns partial pixel
    check("line transfer table cycles", dl, 2200);
    check("line dump table cycles", dd, 2600);
    check("partial pixel table cycles", dq, 36);
    for (int t = 0; t < 4; t++) n_run[t] = 0;
    for (int k = 0; k < 3; k++) n_pix[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2*NL; i++) wr(16'h8000 | (0 << 10) | i, t_line[i]);
    for (int i = 0; i < 2*NP; i++) wr(16'h8000 | (1 << 10) | i, t_pix[i]);
    for (int i = 0; i < 2*NQ; i++) wr(16'h8000 | (2 << 10) | i, t_part[i]);
    for (int i = 0; i < 2*ND; i++) wr(16'h8000 | (3 << 10) | i, t_dump[i]);
    wr(R_TBL_LEN0 + 0, NL); wr(R_TBL_LEN0 + 1, NP);
    wr(R_TBL_LEN0 + 2, NQ); wr(R_TBL_LEN0 + 3, ND);
    // all other registers keep their reset values (the example parameter
    // file); only the ROI is set: lines 1000..1003, pixels 500..563 per output
    wr(R_FLAGS, 32'b1111);
    wr(R_ROI_X1, 500); wr(R_ROI_X2, 563);
    wr(R_ROI_Y1, 1000); wr(R_ROI_Y2, 1003);
    wr(R_START, 1);
    @(negedge shutter[0]);
    t0 = $time;
    @(posedge done[0]);
    t1 = $time;
    // 2048 lines and 2048 pixels per output section
    check("line dump runs", n_run[TBL_DUMP], 2048 + 2044);
    check("line transfer runs", n_run[TBL_LINE], 4);
    check("pixel transfer runs", n_run[TBL_PIXEL], 4 * (5 + 64 + 5));
    check("partial pixel runs", n_run[TBL_PARTIAL], 4 * (2048 - 64));
    check("dark pixels", n_pix[PIX_DARK], 4 * 5);
    check("active pixels", n_pix[PIX_ACTIVE], 4 * 64);
    check("overscan pixels", n_pix[PIX_OVERSCAN], 4 * 5);
    check("shutter cycles", shut_len, 72 * 100000);
    rc = 2044 * dd + 4 * (dl + 74 * dp + 1984 * dq);
    checks++;
    if ((t1 - t0) / 10 < rc || (t1 - t0) / 10 > rc + 12) begin
      failures++; $display("read took %0d cycles, table times add up to %0d", (t1 - t0) / 10, rc);
    end else $display("read took %0d cycles for %0d cycles of table time", (t1 - t0) / 10, rc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
