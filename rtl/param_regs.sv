// param_regs: host-writable parameter registers of one detector.
//
// The host sends the detector parameters (written once per detector) and the
// exposure parameters as register writes: host_we with a word address and a
// 32 bit data word. Addresses with bit 15 clear select a register of the map
// in ifpac_pkg; addresses with bit 15 set write waveform table memory
// (host_addr[11:10] selects the table, host_addr[9:0] the word) and are
// passed on to the table RAMs unchanged. A write of 1 to the START register
// pulses `start` for one cycle. The table-length registers give the number of
// state/time entries of each table (0 to 512).
//
// Reset values follow the example parameter file: 4096 x 4096 pixels, 5 dark
// and 5 overscan pixels, single-clock line and pixel clocks, swap "one with
// two", four-output mode (9), shutter enabled, full frame, ExpTime 72 ms,
// one reset, read, group and ramp, single detector mode, ADC data on. The
// register map, the dark_read flag and the empty tables after reset are this
// design's choices. Registers take the new value on the clock edge after the
// write.
module param_regs
  import ifpac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     host_we,
  input  logic [15:0]              host_addr,
  input  logic [31:0]              host_wdata,
  output det_cfg_t                 cfg,
  output logic [N_TABLES-1:0][9:0] tbl_len,
  output logic                     start,
  // table memory write port
  output logic                     tbl_we,
  output tbl_e                     tbl_sel,
  output logic [9:0]               tbl_waddr,
  output logic [15:0]              tbl_wdata
);

  logic reg_we;
  logic [4:0] ra;
  assign reg_we    = host_we && !host_addr[15];
  assign ra        = host_addr[4:0];
  assign tbl_we    = host_we && host_addr[15];
  assign tbl_sel   = tbl_e'(host_addr[11:10]);
  assign tbl_waddr = host_addr[9:0];
  assign tbl_wdata = host_wdata[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.active_pix    <= 16'd4096;
      cfg.lines         <= 16'd4096;
      cfg.dark_pix      <= 8'd5;
      cfg.overscan_pix  <= 8'd5;
      cfg.line_dual     <= 1'b0;
      cfg.pixel_dual    <= 1'b0;
      cfg.line_swap     <= LSW_1_2;
      cfg.pixel_swap    <= PSW_1_2;
      cfg.out_mode      <= 4'd9;
      cfg.shutter_en    <= 1'b1;
      cfg.frame_partial <= 1'b0;
      cfg.send_adc      <= 1'b1;
      cfg.dark_read     <= 1'b1;
      cfg.roi_x1        <= '0;
      cfg.roi_x2        <= '0;
      cfg.roi_y1        <= '0;
      cfg.roi_y2        <= '0;
      cfg.exp_time_ms   <= 26'd72;
      cfg.n_resets      <= 16'd1;
      cfg.n_reads       <= 16'd1;
      cfg.n_groups      <= 16'd1;
      cfg.n_ramps       <= 16'd1;
      cfg.multi_det     <= 1'b0;
      tbl_len           <= '0;
      start             <= 1'b0;
    end else begin
      start <= reg_we && (ra == R_START) && host_wdata[0];
      if (reg_we) begin
        unique case (ra)
          R_ACTIVE_PIX: cfg.active_pix   <= host_wdata[15:0];
          R_LINES:      cfg.lines        <= host_wdata[15:0];
          R_DARK:       cfg.dark_pix     <= host_wdata[7:0];
          R_OVERSCAN:   cfg.overscan_pix <= host_wdata[7:0];
          R_CLKTYPE: begin
            cfg.line_dual  <= host_wdata[0];
            cfg.pixel_dual <= host_wdata[1];
          end
          R_LINE_SWAP:  cfg.line_swap  <= line_swap_e'(host_wdata[2:0]);
          R_PIX_SWAP:   cfg.pixel_swap <= pixel_swap_e'(host_wdata[1:0]);
          R_OUT_MODE:   cfg.out_mode   <= host_wdata[3:0];
          R_FLAGS: begin
            cfg.shutter_en    <= host_wdata[0];
            cfg.frame_partial <= host_wdata[1];
            cfg.send_adc      <= host_wdata[2];
            cfg.dark_read     <= host_wdata[3];
          end
          R_ROI_X1:     cfg.roi_x1      <= host_wdata[15:0];
          R_ROI_X2:     cfg.roi_x2      <= host_wdata[15:0];
          R_ROI_Y1:     cfg.roi_y1      <= host_wdata[15:0];
          R_ROI_Y2:     cfg.roi_y2      <= host_wdata[15:0];
          R_EXP_TIME:   cfg.exp_time_ms <= host_wdata[25:0];
          R_N_RESETS:   cfg.n_resets    <= host_wdata[15:0];
          R_N_READS:    cfg.n_reads     <= host_wdata[15:0];
          R_N_GROUPS:   cfg.n_groups    <= host_wdata[15:0];
          R_N_RAMPS:    cfg.n_ramps     <= host_wdata[15:0];
          R_IFPAC_MODE: cfg.multi_det   <= (host_wdata[1:0] == 2'd2);
          5'd20, 5'd21, 5'd22, 5'd23:
                        tbl_len[ra[1:0]] <= host_wdata[9:0];
          default: ;
        endcase
      end
    end
  end

endmodule
