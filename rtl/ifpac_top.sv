// ifpac_top: readout-clock generator of an IFPAC clock card.
//
// Two detector channels, each with its own parameter registers, four
// waveform tables, exposure and readout sequencers, waveform player (16 bit
// state register) and clock steering, feed the backplane clock mapper. In
// single detector mode (IFPACMode = 1, set through detector 1's registers)
// detector 1 drives all 32 backplane clocks with full per-quadrant output
// selection; in multi detector mode (IFPACMode = 2) the two detectors run
// independently and share the 32 clocks, 16 each, with ganged quadrants.
//
// Host interface: a register-write bus. host_det selects the detector,
// host_addr/host_wdata are the register or table word (map in ifpac_pkg).
// The host link itself (USB 2.0 or Ethernet) is outside this block.
// Outputs: bp_clk[k] is backplane Clock(k+1); analog[d] = {HOLD, CNV, RST,
// SN} of analog chain d; one shutter line per detector. The remaining
// outputs report sequencing events (table runs, digitised pixels, the
// steering decisions) for monitoring. Clock: 100 MHz, so one table time unit
// is one cycle (10 ns). CLKS_PER_MS and TABLE_DEPTH default to the
// controller's 100 MHz clock and 1 K word tables.
module ifpac_top
  import ifpac_pkg::*;
#(
  parameter int unsigned CLKS_PER_MS = 100000,
  parameter int unsigned TABLE_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // host register-write bus
  input  logic             host_we,
  input  logic             host_det,     // 0: detector 1, 1: detector 2
  input  logic [15:0]      host_addr,
  input  logic [31:0]      host_wdata,
  // backplane and analog board
  output logic [31:0]      bp_clk,
  output logic [1:0][3:0]  analog,
  output logic [1:0]       shutter,
  // status and monitoring
  output logic             multi_det,
  output logic [1:0]       busy,
  output logic [1:0]       done,
  output logic [1:0]       pix_strobe,
  output logic [1:0][1:0]  pix_kind,
  output logic [1:0]       run_accept,
  output logic [1:0][1:0]  run_tbl,
  output logic [1:0][5:0]  swapped,
  output logic [1:0]       underrun
);

  localparam int unsigned N_DET = 2;

  det_cfg_t         cfg [N_DET];
  logic [1:0][15:0] state;
  logic [1:0][3:0]  line_ab, line_cd;
  logic [1:0][2:0]  ser_e, ser_f, ser_g, ser_h;

  for (genvar d = 0; d < N_DET; d++) begin : g_det
    pix_kind_e pk;
    tbl_e      rt;
    det_channel #(.CLKS_PER_MS(CLKS_PER_MS), .DEPTH(TABLE_DEPTH)) u_ch (
      .clk, .rst_n,
      .host_we    (host_we && (host_det == 1'(d))),
      .host_addr, .host_wdata,
      .cfg        (cfg[d]),
      .state      (state[d]),
      .line_ab    (line_ab[d]), .line_cd (line_cd[d]),
      .ser_e      (ser_e[d]), .ser_f (ser_f[d]), .ser_g (ser_g[d]), .ser_h (ser_h[d]),
      .swapped    (swapped[d]),
      .shutter    (shutter[d]),
      .busy       (busy[d]),
      .done       (done[d]),
      .pix_strobe (pix_strobe[d]),
      .pix_kind   (pk),
      .run_accept (run_accept[d]),
      .run_tbl    (rt),
      .underrun   (underrun[d])
    );
    assign pix_kind[d] = pk;
    assign run_tbl[d]  = rt;
  end

  assign multi_det = cfg[0].multi_det;

  clock_mapper u_map (
    .multi_det,
    .state, .line_ab, .line_cd, .ser_e, .ser_f, .ser_g, .ser_h,
    .bp_clk, .analog
  );

endmodule
