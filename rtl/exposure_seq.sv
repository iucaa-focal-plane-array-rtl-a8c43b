// exposure_seq: runs one exposure sequence of a detector.
//
// On `start` it performs NRamps repetitions of
//   NResets reset frames (clear commands to the readout sequencer),
//   the exposure: ExpTime milliseconds, with the shutter line high if
//     ShutterEnable is set,
//   NGroups x NReads read frames,
// and then pulses `done`. For a CCD with NResets = NReads = NGroups =
// NRamps = 1 this is: clear once, open the shutter for ExpTime, close it,
// read the frame once. A frame command is handed over with a valid/ready
// handshake and the sequencer waits for frame_done before the next step.
// NReads, NGroups and NRamps of 0 are treated as 1; NResets of 0 skips the
// reset frames; ExpTime of 0 skips the exposure. The exposure timer counts
// CLKS_PER_MS clock cycles per millisecond (100000 at the 100 MHz clock that
// gives the 10 ns time unit), and the shutter is high for exactly
// ExpTime x CLKS_PER_MS cycles. The sequence itself follows the controller's
// exposure parameters; the handling of zero counts and the drop frames and
// sampling schemes of IR detectors (not sequenced here) are this design's
// simplifications.
module exposure_seq
  import ifpac_pkg::*;
#(
  parameter int unsigned CLKS_PER_MS = 100000,
  localparam int unsigned PW = $clog2(CLKS_PER_MS + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  det_cfg_t   cfg,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // frame commands to the readout sequencer
  output logic       cmd_valid,
  output frame_cmd_e cmd,
  input  logic       cmd_ready,
  input  logic       frame_done,
  // shutter control line of this detector
  output logic       shutter,
  output logic       exposing
);

  typedef enum logic [2:0] {
    X_IDLE, X_RAMP, X_RST_CMD, X_RST_WAIT, X_EXPOSE, X_RD_CMD, X_RD_WAIT
  } st_e;

  st_e         st;
  logic [15:0] ramp_cnt, rst_cnt, rd_cnt, grp_cnt;
  logic [25:0] ms_left;
  logic [PW-1:0] pre;

  logic [15:0] n_reads, n_groups, n_ramps;
  assign n_reads  = (cfg.n_reads  == '0) ? 16'd1 : cfg.n_reads;
  assign n_groups = (cfg.n_groups == '0) ? 16'd1 : cfg.n_groups;
  assign n_ramps  = (cfg.n_ramps  == '0) ? 16'd1 : cfg.n_ramps;

  assign busy      = (st != X_IDLE);
  assign cmd_valid = (st == X_RST_CMD) || (st == X_RD_CMD);
  assign cmd       = (st == X_RD_CMD) ? FRM_READ : FRM_CLEAR;
  assign exposing  = (st == X_EXPOSE);
  assign shutter   = exposing && cfg.shutter_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= X_IDLE;
      ramp_cnt <= '0;
      rst_cnt  <= '0;
      rd_cnt   <= '0;
      grp_cnt  <= '0;
      ms_left  <= '0;
      pre      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        X_IDLE: if (start) begin
          ramp_cnt <= '0;
          st       <= X_RAMP;
        end
        X_RAMP: begin
          rst_cnt <= '0;
          rd_cnt  <= '0;
          grp_cnt <= '0;
          ms_left <= cfg.exp_time_ms;
          pre     <= PW'(CLKS_PER_MS - 1);
          if (cfg.n_resets != '0)          st <= X_RST_CMD;
          else if (cfg.exp_time_ms != '0)  st <= X_EXPOSE;
          else                             st <= X_RD_CMD;
        end
        X_RST_CMD: if (cmd_ready) st <= X_RST_WAIT;
        X_RST_WAIT: if (frame_done) begin
          if (rst_cnt + 16'd1 < cfg.n_resets) begin
            rst_cnt <= rst_cnt + 16'd1;
            st      <= X_RST_CMD;
          end else begin
            st <= (cfg.exp_time_ms != '0) ? X_EXPOSE : X_RD_CMD;
          end
        end
        X_EXPOSE: begin
          if (pre == '0) begin
            pre <= PW'(CLKS_PER_MS - 1);
            if (ms_left <= 26'd1) st <= X_RD_CMD;
            else ms_left <= ms_left - 26'd1;
          end else begin
            pre <= pre - 1'b1;
          end
        end
        X_RD_CMD: if (cmd_ready) st <= X_RD_WAIT;
        X_RD_WAIT: if (frame_done) begin
          if (rd_cnt + 16'd1 < n_reads) begin
            rd_cnt <= rd_cnt + 16'd1;
            st     <= X_RD_CMD;
          end else if (grp_cnt + 16'd1 < n_groups) begin
            rd_cnt  <= '0;
            grp_cnt <= grp_cnt + 16'd1;
            st      <= X_RD_CMD;
          end else if (ramp_cnt + 16'd1 < n_ramps) begin
            ramp_cnt <= ramp_cnt + 16'd1;
            st       <= X_RAMP;
          end else begin
            done <= 1'b1;
            st   <= X_IDLE;
          end
        end
        default: st <= X_IDLE;
      endcase
    end
  end

  // a frame command is held until the readout sequencer takes it
  a_cmd_held: assert property (@(posedge clk) disable iff (!rst_n)
                               (cmd_valid && !cmd_ready) |=> (cmd_valid && $stable(cmd)))
    else $error("exposure_seq: frame command withdrawn before it was taken");

endmodule
