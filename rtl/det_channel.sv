// det_channel: everything that generates the readout clocks of one detector.
//
// Holds the detector's parameter registers, its four waveform tables (line
// transfer, pixel transfer, partial pixel, line dump; DEPTH words each), the
// exposure sequencer, the readout sequencer, the waveform player that owns
// the detector's 16 bit state register, and the clock steering that derives
// the per-quadrant line and serial clocks for the selected output mode.
//
// Data flow: host writes -> param_regs (configuration, table contents,
// start) -> exposure_seq (clear / expose / read frames) -> readout_ctrl
// (table runs) -> wave_player (state register, 10 ns per time unit) ->
// clock_steer (direction per section). The host bus is already decoded for
// this detector (host_we is for this channel only).
module det_channel
  import ifpac_pkg::*;
#(
  parameter int unsigned CLKS_PER_MS = 100000,
  parameter int unsigned DEPTH       = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [15:0] host_addr,
  input  logic [31:0] host_wdata,
  output det_cfg_t    cfg,
  output logic [15:0] state,
  output logic [3:0]  line_ab,
  output logic [3:0]  line_cd,
  output logic [2:0]  ser_e,
  output logic [2:0]  ser_f,
  output logic [2:0]  ser_g,
  output logic [2:0]  ser_h,
  output logic [5:0]  swapped,
  output logic        shutter,
  output logic        busy,
  output logic        done,
  output logic        pix_strobe,
  output pix_kind_e   pix_kind,
  output logic        run_accept,   // a table run was accepted this cycle
  output tbl_e        run_tbl,
  output logic        underrun
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [N_TABLES-1:0][9:0]  tbl_len;
  logic                      start, tbl_we;
  tbl_e                      tbl_sel;
  logic [9:0]                tbl_waddr;
  logic [15:0]               tbl_wdata;
  logic [AW-1:0]             ram_raddr;
  logic [N_TABLES-1:0][15:0] ram_rdata;
  logic [N_TABLES-1:0][AW-1:0] tbl_len_p;

  logic       cmd_valid, cmd_ready, frame_done, exposing;
  frame_cmd_e cmd;
  logic       req_valid, req_ready, player_busy, entry_start;
  tbl_e       req_tbl;
  logic       xbusy;

  param_regs u_regs (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata,
    .cfg, .tbl_len, .start,
    .tbl_we, .tbl_sel, .tbl_waddr, .tbl_wdata
  );

  for (genvar t = 0; t < N_TABLES; t++) begin : g_tbl
    wave_table_ram #(.DEPTH(DEPTH), .WIDTH(16)) u_ram (
      .clk,
      .we    (tbl_we && (tbl_sel == tbl_e'(t))),
      .waddr (tbl_waddr[AW-1:0]),
      .wdata (tbl_wdata),
      .raddr (ram_raddr),
      .rdata (ram_rdata[t])
    );
    // table lengths are limited to what the memory holds
    assign tbl_len_p[t] = (tbl_len[t] > 10'(DEPTH / 2)) ? AW'(DEPTH / 2) : AW'(tbl_len[t]);
  end

  exposure_seq #(.CLKS_PER_MS(CLKS_PER_MS)) u_exp (
    .clk, .rst_n, .cfg, .start,
    .busy (xbusy), .done,
    .cmd_valid, .cmd, .cmd_ready, .frame_done,
    .shutter, .exposing
  );

  readout_ctrl u_rd (
    .clk, .rst_n, .cfg,
    .cmd_valid, .cmd, .cmd_ready, .frame_done,
    .req_valid, .req_tbl, .req_ready, .player_busy,
    .pix_strobe, .pix_kind
  );

  wave_player #(.DEPTH(DEPTH)) u_play (
    .clk, .rst_n,
    .req_valid, .req_tbl, .req_ready,
    .tbl_len (tbl_len_p),
    .ram_raddr, .ram_rdata,
    .state, .busy (player_busy), .entry_start, .underrun
  );

  clock_steer u_steer (
    .state, .out_mode (cfg.out_mode),
    .line_dual (cfg.line_dual), .pixel_dual (cfg.pixel_dual),
    .line_swap (cfg.line_swap), .pixel_swap (cfg.pixel_swap),
    .line_ab, .line_cd, .ser_e, .ser_f, .ser_g, .ser_h, .swapped
  );

  assign busy       = xbusy || player_busy;
  assign run_accept = req_valid && req_ready;
  assign run_tbl    = req_tbl;

endmodule
