// readout_ctrl: turns a frame command into the sequence of waveform-table
// runs that clears or reads the detector.
//
// The detector is divided into output sections according to the output mode:
// modes 5, 6 and 9 split each line between two outputs (half the active
// pixels per output), modes 7, 8 and 9 split the frame between the lower and
// upper halves (half the lines per output). All outputs of a detector are
// clocked together, so the sequence is that of one section:
//
//   clear (FRM_CLEAR): one line-dump run per line of the section.
//   read  (FRM_READ):  for each line of the section
//     - outside the ROI lines: one line-dump run (fast line skip);
//     - inside: one line-transfer run, then per pixel of the serial
//       register: DarkPixels dark pixels (pixel-transfer runs if dark_read,
//       else partial-pixel skips), the pixels before the ROI (partial-pixel
//       skips), the ROI pixels (pixel-transfer runs), the pixels after it
//       (partial-pixel skips, to empty the register), then OverScanPixels
//       overscan pixels (pixel-transfer runs).
//   FULL frame readout uses the whole section as ROI; PARTIAL uses
//   roi_x1..roi_x2, roi_y1..roi_y2 counted from the section's amplifier,
//   with x2/y2 clamped to the section. Counts of zero skip that part.
//
// Each run is requested from the waveform player with a valid/ready
// handshake; a new request is presented in the cycle after the previous one
// was accepted. After the last request the block waits until the player is
// idle and then pulses frame_done. Each digitised pixel (pixel-transfer run)
// is reported on pix_strobe/pix_kind when send_adc is set. Which tables serve
// which part of the frame follows the controller's description of the four
// tables; the order of dark/ROI/overscan pixels within a line, the ROI
// coordinate convention and the dark_read option are this design's choices.
// The configuration must not change while a frame is in progress.
module readout_ctrl
  import ifpac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  det_cfg_t   cfg,
  // frame command from the exposure sequencer
  input  logic       cmd_valid,
  input  frame_cmd_e cmd,
  output logic       cmd_ready,
  output logic       frame_done,
  // table runs to the waveform player
  output logic       req_valid,
  output tbl_e       req_tbl,
  input  logic       req_ready,
  input  logic       player_busy,
  // digitised-pixel report
  output logic       pix_strobe,
  output pix_kind_e  pix_kind
);

  typedef enum logic [1:0] {S_IDLE, S_LINE, S_PIX, S_DRAIN} st_e;
  typedef enum logic [2:0] {SEG_DARK, SEG_PRE, SEG_ROI, SEG_POST, SEG_OVER, SEG_NONE} seg_e;

  st_e         st;
  frame_cmd_e  cmd_q;
  seg_e        seg;
  logic [15:0] line_idx, pix_idx;

  // ---- section geometry ---------------------------------------------------
  logic        split_h, split_v;
  logic [15:0] pix_out, lines_out, x1, x2, y1, y2;
  logic [15:0] n_pre, n_roi, n_post;
  logic [15:0] seg_len [5];

  always_comb begin
    split_h   = (cfg.out_mode == 4'd5) || (cfg.out_mode == 4'd6) || (cfg.out_mode == 4'd9);
    split_v   = (cfg.out_mode == 4'd7) || (cfg.out_mode == 4'd8) || (cfg.out_mode == 4'd9);
    pix_out   = split_h ? (cfg.active_pix >> 1) : cfg.active_pix;
    lines_out = split_v ? (cfg.lines >> 1) : cfg.lines;
    if (cfg.frame_partial) begin
      x1 = cfg.roi_x1;
      x2 = (cfg.roi_x2 < pix_out) ? cfg.roi_x2 : pix_out - 16'd1;
      y1 = cfg.roi_y1;
      y2 = (cfg.roi_y2 < lines_out) ? cfg.roi_y2 : lines_out - 16'd1;
    end else begin
      x1 = '0;
      x2 = pix_out - 16'd1;
      y1 = '0;
      y2 = lines_out - 16'd1;
    end
    n_pre  = (x1 < pix_out) ? x1 : pix_out;
    n_roi  = (pix_out != '0 && x1 <= x2) ? (x2 - x1 + 16'd1) : '0;
    n_post = pix_out - n_pre - n_roi;
    seg_len[SEG_DARK] = 16'(cfg.dark_pix);
    seg_len[SEG_PRE]  = n_pre;
    seg_len[SEG_ROI]  = n_roi;
    seg_len[SEG_POST] = n_post;
    seg_len[SEG_OVER] = 16'(cfg.overscan_pix);
  end

  // first non-empty segment at or after s
  function automatic seg_e next_seg(input int s);
    for (int k = 0; k < 5; k++)
      if (k >= s && seg_len[k] != '0) return seg_e'(k);
    return SEG_NONE;
  endfunction

  function automatic tbl_e seg_tbl(input seg_e s);
    unique case (s)
      SEG_DARK: return cfg.dark_read ? TBL_PIXEL : TBL_PARTIAL;
      SEG_ROI, SEG_OVER: return TBL_PIXEL;
      default: return TBL_PARTIAL;
    endcase
  endfunction

  logic line_in_roi, last_line, accept;
  assign line_in_roi = (cmd_q == FRM_READ) && (line_idx >= y1) && (line_idx <= y2);
  assign last_line   = (line_idx + 16'd1) >= lines_out;
  assign accept      = req_valid && req_ready;
  assign cmd_ready   = (st == S_IDLE);

  always_comb begin
    req_valid = 1'b0;
    req_tbl   = TBL_DUMP;
    unique case (st)
      S_LINE: begin
        req_valid = 1'b1;
        req_tbl   = line_in_roi ? TBL_LINE : TBL_DUMP;
      end
      S_PIX: begin
        req_valid = 1'b1;
        req_tbl   = seg_tbl(seg);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      cmd_q      <= FRM_CLEAR;
      seg        <= SEG_NONE;
      line_idx   <= '0;
      pix_idx    <= '0;
      frame_done <= 1'b0;
      pix_strobe <= 1'b0;
      pix_kind   <= PIX_ACTIVE;
    end else begin
      frame_done <= 1'b0;
      pix_strobe <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          cmd_q    <= cmd;
          line_idx <= '0;
          st       <= (lines_out == '0) ? S_DRAIN : S_LINE;
        end
        S_LINE: if (accept) begin
          if (line_in_roi && next_seg(0) != SEG_NONE) begin
            seg     <= next_seg(0);
            pix_idx <= '0;
            st      <= S_PIX;
          end else if (last_line) begin
            st <= S_DRAIN;
          end else begin
            line_idx <= line_idx + 16'd1;
          end
        end
        S_PIX: if (accept) begin
          if (req_tbl == TBL_PIXEL && cfg.send_adc) begin
            pix_strobe <= 1'b1;
            pix_kind   <= (seg == SEG_DARK) ? PIX_DARK :
                          (seg == SEG_OVER) ? PIX_OVERSCAN : PIX_ACTIVE;
          end
          if (pix_idx + 16'd1 < seg_len[seg]) begin
            pix_idx <= pix_idx + 16'd1;
          end else begin
            pix_idx <= '0;
            seg     <= next_seg(int'(seg) + 1);
            if (next_seg(int'(seg) + 1) == SEG_NONE) begin
              if (last_line) st <= S_DRAIN;
              else begin
                line_idx <= line_idx + 16'd1;
                st       <= S_LINE;
              end
            end
          end
        end
        S_DRAIN: if (!player_busy) begin
          frame_done <= 1'b1;
          st         <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
