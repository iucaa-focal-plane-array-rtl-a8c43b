// wave_player: plays waveform tables of state/time pairs onto the 16 bit
// waveform state register.
//
// A table run is requested with req_valid/req_tbl and accepted when
// req_ready is high; the player then steps through the table's entries
// (tbl_len[t] pairs), driving each 16 bit state onto `state` for exactly
// `time` clock cycles (10 ns units at 100 MHz). The next request is accepted
// while the last entries of the current run are still being fetched, so runs
// of any table follow each other with no gap: this is how the readout
// sequencer strings line, pixel, partial-pixel and dump runs together.
//
// Fetch: the tables are synchronous RAMs with one cycle read latency, and one
// entry takes three cycles to fetch (state address, time address, time data).
// One entry is prefetched into a buffer while the current state is held, and
// the time word can be forwarded straight from the RAM, so any time of 3 or
// more cycles is met exactly -- the 30 ns minimum state-to-state time of the
// controller. Time values below 3 are played as 3 (this design's choice).
// After the last entry the last state stays on the outputs. `underrun` pulses
// if a state expired before its successor was ready, which cannot happen for
// times >= 3 when requests are presented in time.
//
// Timing: state changes on the clock edge; busy is low once the final state
// of the final run is in its last cycle and nothing is pending.
module wave_player
  import ifpac_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned EW = AW - 1          // entry index width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // run requests
  input  logic                      req_valid,
  input  tbl_e                      req_tbl,
  output logic                      req_ready,
  input  logic [N_TABLES-1:0][EW:0] tbl_len,   // entries per table
  // table read port
  output logic [AW-1:0]             ram_raddr,
  input  logic [N_TABLES-1:0][15:0] ram_rdata,
  // waveform state
  output logic [15:0]               state,
  output logic                      busy,
  output logic                      entry_start, // a new entry is loaded this cycle
  output logic                      underrun
);

  typedef enum logic [1:0] {F_IDLE, F_A, F_B, F_C} fph_e;

  fph_e        fph;
  tbl_e        f_tbl, fa_tbl;
  logic [EW-1:0] f_idx, fa_idx;
  logic [EW:0] f_len;
  logic        f_more;
  logic        buf_valid;
  logic [15:0] buf_state, buf_time;
  logic [15:0] cnt_q;

  logic        avail, consume, start_fetch, accept;
  logic [15:0] nxt_time, nxt_time_c;
  logic [15:0] rd_word;

  assign rd_word     = ram_rdata[fa_tbl];
  assign avail       = buf_valid || (fph == F_C);
  assign nxt_time    = buf_valid ? buf_time : rd_word;
  assign nxt_time_c  = (nxt_time < 16'(MIN_STATE_TIME)) ? 16'(MIN_STATE_TIME) : nxt_time;
  assign consume     = avail && (cnt_q <= 16'd1);
  assign req_ready   = !f_more;
  assign accept      = req_valid && req_ready;
  assign start_fetch = f_more &&
                       (((fph == F_IDLE) && (!buf_valid || consume)) ||
                        ((fph == F_C) && consume));
  assign ram_raddr   = (fph == F_A) ? {fa_idx, 1'b0} : {fa_idx, 1'b1};
  assign busy        = f_more || (fph != F_IDLE) || buf_valid || (cnt_q > 16'd1);
  assign underrun    = (cnt_q == 16'd1) && !avail && (f_more || (fph != F_IDLE));

  // run pointer: which table entry is fetched next
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_tbl  <= TBL_LINE;
      f_idx  <= '0;
      f_len  <= '0;
      f_more <= 1'b0;
    end else if (accept) begin
      f_tbl  <= req_tbl;
      f_idx  <= '0;
      f_len  <= tbl_len[req_tbl];
      f_more <= (tbl_len[req_tbl] != '0);
    end else if (start_fetch) begin
      f_idx  <= f_idx + 1'b1;
      f_more <= ({1'b0, f_idx} + 1'b1) < f_len;
    end
  end

  // fetch engine and one-entry prefetch buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fph       <= F_IDLE;
      fa_tbl    <= TBL_LINE;
      fa_idx    <= '0;
      buf_valid <= 1'b0;
      buf_state <= '0;
      buf_time  <= '0;
    end else begin
      if (consume) buf_valid <= 1'b0;
      unique case (fph)
        F_IDLE: ;
        F_A:    fph <= F_B;
        F_B: begin
          fph       <= F_C;
          buf_state <= rd_word;
        end
        F_C: begin
          fph <= F_IDLE;
          if (!consume) begin
            buf_valid <= 1'b1;
            buf_time  <= rd_word;
          end
        end
      endcase
      if (start_fetch) begin
        fph     <= F_A;
        fa_tbl  <= f_tbl;
        fa_idx  <= f_idx;
      end
    end
  end

  // output stage: hold each state for its time
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= '0;
      cnt_q       <= '0;
      entry_start <= 1'b0;
    end else begin
      entry_start <= consume;
      if (consume) begin
        state <= buf_state;
        cnt_q <= nxt_time_c;
      end else if (cnt_q != '0) begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  // a request must stay stable until it is accepted
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (req_valid && !req_ready) |=> (req_valid && $stable(req_tbl));
  endproperty
  a_req_stable: assert property (p_req_stable)
    else $error("wave_player: request dropped or changed before it was accepted");

endmodule
