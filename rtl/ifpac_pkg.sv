// ifpac_pkg: types and constants shared by the IFPAC readout-clock generator.
//
// The 16 bit waveform state word (bit positions follow the controller's state
// register format), the four waveform table identifiers, the clock-swap
// encodings, and the per-detector configuration record that the host
// parameter registers feed to the sequencers. Widths of the configuration
// fields follow the ranges the parameter file allows (8 bit dark/overscan
// counts, ExpTime from 1 ms to 9.5 hours). Numeric encodings of the swap
// options and the register map are this design's own choice.
package ifpac_pkg;

  // ---- 16 bit waveform state word -------------------------------------
  localparam int unsigned S_I1   = 0;   // line clocks I1..I4 : S0..S3
  localparam int unsigned S_R1   = 4;   // serial clocks R1..R3 : S4..S6
  localparam int unsigned S_RG   = 7;   // reset gate (R-phi)
  localparam int unsigned S_SW   = 8;   // summing well
  localparam int unsigned S_DG   = 9;   // dump gate
  localparam int unsigned S_TGA  = 10;  // transfer gate
  localparam int unsigned S_SN   = 11;  // sample
  localparam int unsigned S_RST  = 12;  // reset (analog chain)
  localparam int unsigned S_CNV  = 13;  // ADC conversion
  localparam int unsigned S_HOLD = 14;  // hold / integration
  localparam int unsigned S_EMR  = 15;  // EMCCD high-voltage clock

  // ---- waveform tables --------------------------------------------------
  localparam int unsigned N_TABLES = 4;
  typedef enum logic [1:0] {
    TBL_LINE    = 2'd0,   // line transfer
    TBL_PIXEL   = 2'd1,   // pixel transfer (digitised pixel)
    TBL_PARTIAL = 2'd2,   // partial pixel (fast pixel skip)
    TBL_DUMP    = 2'd3    // line dump (clear / fast line skip)
  } tbl_e;

  // smallest state time the player guarantees, in clock cycles (10 ns each)
  localparam int unsigned MIN_STATE_TIME = 3;

  // ---- clock swap options -------------------------------------------------
  typedef enum logic [2:0] {
    LSW_1_2 = 3'd0, LSW_1_3 = 3'd1, LSW_1_4 = 3'd2,
    LSW_2_3 = 3'd3, LSW_2_4 = 3'd4, LSW_3_4 = 3'd5
  } line_swap_e;

  typedef enum logic [1:0] {
    PSW_1_2 = 2'd0, PSW_1_3 = 2'd1, PSW_2_3 = 2'd2
  } pixel_swap_e;

  // ---- frame commands from the exposure sequencer to the readout control --
  typedef enum logic {
    FRM_CLEAR = 1'b0,     // dump every line (reset frame)
    FRM_READ  = 1'b1      // read the frame (ROI, dark, overscan)
  } frame_cmd_e;

  // kind of a digitised pixel, reported with each pixel-table run
  typedef enum logic [1:0] {
    PIX_DARK = 2'd0, PIX_ACTIVE = 2'd1, PIX_OVERSCAN = 2'd2
  } pix_kind_e;

  // ---- per-detector configuration -----------------------------------------
  typedef struct packed {
    logic [15:0] active_pix;     // ActivePixelsPerLine
    logic [15:0] lines;          // LinesPerFrame
    logic [7:0]  dark_pix;       // DarkPixels per output
    logic [7:0]  overscan_pix;   // OverScanPixels per output
    logic        line_dual;      // line clocks: 0 single, 1 dual type
    logic        pixel_dual;     // pixel clocks: 0 single, 1 dual type
    line_swap_e  line_swap;      // LineClkSwap
    pixel_swap_e pixel_swap;     // PixelClkSwap
    logic [3:0]  out_mode;       // output selection 1..9
    logic        shutter_en;     // ShutterEnable
    logic        frame_partial;  // FrameReadout: 0 FULL, 1 PARTIAL (ROI)
    logic        send_adc;       // SendADCData
    logic        dark_read;      // digitise (1) or skip (0) dark pixels
    logic [15:0] roi_x1, roi_x2; // ROI columns, per output section
    logic [15:0] roi_y1, roi_y2; // ROI lines, per output section
    logic [25:0] exp_time_ms;    // ExpTime in ms
    logic [15:0] n_resets, n_reads, n_groups, n_ramps;
    logic        multi_det;      // IFPACMode: 0 single, 1 multi detector
  } det_cfg_t;

  // ---- host register map (word addresses, host_addr[15] = 0) --------------
  // host_addr[15] = 1 writes table memory: host_addr[11:10] table,
  // host_addr[9:0] word (even word = state, odd word = time).
  localparam logic [4:0] R_ACTIVE_PIX = 5'd0;
  localparam logic [4:0] R_LINES      = 5'd1;
  localparam logic [4:0] R_DARK       = 5'd2;
  localparam logic [4:0] R_OVERSCAN   = 5'd3;
  localparam logic [4:0] R_CLKTYPE    = 5'd4;  // [0] line dual, [1] pixel dual
  localparam logic [4:0] R_LINE_SWAP  = 5'd5;
  localparam logic [4:0] R_PIX_SWAP   = 5'd6;
  localparam logic [4:0] R_OUT_MODE   = 5'd7;
  localparam logic [4:0] R_FLAGS      = 5'd8;  // [0] shutter, [1] partial, [2] send adc, [3] dark read
  localparam logic [4:0] R_ROI_X1     = 5'd9;
  localparam logic [4:0] R_ROI_X2     = 5'd10;
  localparam logic [4:0] R_ROI_Y1     = 5'd11;
  localparam logic [4:0] R_ROI_Y2     = 5'd12;
  localparam logic [4:0] R_EXP_TIME   = 5'd13;
  localparam logic [4:0] R_N_RESETS   = 5'd14;
  localparam logic [4:0] R_N_READS    = 5'd15;
  localparam logic [4:0] R_N_GROUPS   = 5'd16;
  localparam logic [4:0] R_N_RAMPS    = 5'd17;
  localparam logic [4:0] R_IFPAC_MODE = 5'd18; // 1 single, 2 multi detector
  localparam logic [4:0] R_TBL_LEN0   = 5'd20; // 20..23: entries per table
  localparam logic [4:0] R_START      = 5'd31; // write 1: start exposure

endpackage
