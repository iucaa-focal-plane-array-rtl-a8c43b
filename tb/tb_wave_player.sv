// tb_wave_player: loads the four E2V CCD 4240 example tables (line transfer,
// pixel transfer, partial pixel and line dump) into four table RAMs, asks the
// player for a random back-to-back sequence of table runs and checks that
// every entry appears on the state register with its state word and for
// exactly its time in clock cycles, with no gap between runs. A short table
// with times of 1 and 2 checks that such times are played as 3 cycles, and
// the latency from an idle request to the first state is checked.
module tb_wave_player;
  import ifpac_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  tbl_e req_tbl = TBL_LINE;
  logic req_ready;
  logic [3:0][9:0] tbl_len;
  logic [9:0] ram_raddr;
  logic [3:0][15:0] ram_rdata;
  logic [15:0] state;
  logic busy, entry_start, underrun;
  logic       twe = 0;
  logic [1:0] twt = 0;
  logic [9:0] twa = 0;
  logic [15:0] twd = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  wave_player dut (.*);

  for (genvar t = 0; t < 4; t++) begin : g_ram
    wave_table_ram ram (.clk, .we(twe && twt == 2'(t)), .waddr(twa), .wdata(twd),
                        .raddr(ram_raddr), .rdata(ram_rdata[t]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // example tables: state, time
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

  // expected stream and observed stream
  logic [15:0] exp_state [$];
  int          exp_time  [$];
  logic [15:0] obs_state [$];
  int          obs_cycle [$];

  task automatic wr(input int t, input int a, input logic [15:0] d);
    @(negedge clk); twe = 1; twt = 2'(t); twa = 10'(a); twd = d;
    @(negedge clk); twe = 0;
  endtask

  task automatic expect_run(input int t);
    case (t)
      0: for (int i = 0; i < NL; i++) begin exp_state.push_back(t_line[2*i]); exp_time.push_back(int'(t_line[2*i+1])); end
      1: for (int i = 0; i < NP; i++) begin exp_state.push_back(t_pix[2*i]);  exp_time.push_back(int'(t_pix[2*i+1])); end
      2: for (int i = 0; i < NQ; i++) begin exp_state.push_back(t_part[2*i]); exp_time.push_back(int'(t_part[2*i+1])); end
      default: for (int i = 0; i < ND; i++) begin exp_state.push_back(t_dump[2*i]); exp_time.push_back(int'(t_dump[2*i+1])); end
    endcase
  endtask

  task automatic request(input int t);
    @(negedge clk);
    req_valid = 1; req_tbl = tbl_e'(t);
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (entry_start) begin
      obs_state.push_back(state);
      obs_cycle.push_back(cycle);
    end
    if (underrun) begin
      failures++;
      $display("underrun at cycle %0d", cycle);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tbl_len = {10'(ND), 10'(NQ), 10'(NP), 10'(NL)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2*NL; i++) wr(0, i, t_line[i]);
    for (int i = 0; i < 2*NP; i++) wr(1, i, t_pix[i]);
    for (int i = 0; i < 2*NQ; i++) wr(2, i, t_part[i]);
    for (int i = 0; i < 2*ND; i++) wr(3, i, t_dump[i]);

    // latency from an idle request to the first state: 5 cycles (accept, 3 fetch, load)
    begin
      int c0;
      @(negedge clk); req_valid = 1; req_tbl = TBL_PIXEL;
      @(posedge clk); c0 = cycle; #1 req_valid = 0;
      expect_run(1);
      @(posedge entry_start);
      checks++;
      if (cycle - c0 != 5) begin failures++; $display("idle latency %0d", cycle - c0); end
      wait (!busy);
    end

    // random back-to-back runs
    for (int r = 0; r < 40; r++) begin
      int t;
      t = $urandom_range(0, 3);
      expect_run(t);
      request(t);
    end
    wait (!busy);
    repeat (5) @(posedge clk);

    // compare observed entries with the expected stream
    checks++;
    if (obs_state.size() != exp_state.size()) begin
      failures++;
      $display("entries: got %0d expected %0d", obs_state.size(), exp_state.size());
    end
    for (int i = 0; i < obs_state.size() && i < exp_state.size(); i++) begin
      checks++;
      if (obs_state[i] !== exp_state[i]) begin
        failures++;
        $display("entry %0d: state %h expected %h", i, obs_state[i], exp_state[i]);
      end
      // durations of all but the idle-separated first run and the last entry
      if (i >= NP && i + 1 < obs_state.size()) begin
        checks++;
        if (obs_cycle[i+1] - obs_cycle[i] != exp_time[i]) begin
          failures++;
          $display("entry %0d (%h): held %0d cycles, expected %0d", i, obs_state[i],
                   obs_cycle[i+1] - obs_cycle[i], exp_time[i]);
        end
      end
    end
    // the first run's durations (followed by a gap)
    for (int i = 0; i + 1 < NP; i++) begin
      checks++;
      if (obs_cycle[i+1] - obs_cycle[i] != exp_time[i]) begin
        failures++; $display("first run entry %0d wrong duration", i);
      end
    end

    // times below the 30 ns minimum are played as 3 cycles
    wr(2, 0, 16'h0001); wr(2, 1, 16'd1);
    wr(2, 2, 16'h0002); wr(2, 3, 16'd2);
    wr(2, 4, 16'h0003); wr(2, 5, 16'd0);
    wr(2, 6, 16'h0004); wr(2, 7, 16'd7);
    tbl_len[2] = 10'd4;
    obs_state.delete(); obs_cycle.delete();
    request(2);
    wait (!busy);
    repeat (5) @(posedge clk);
    checks++;
    if (obs_state.size() != 4) begin failures++; $display("short table: %0d entries", obs_state.size()); end
    else for (int i = 0; i < 3; i++) begin
      checks++;
      if (obs_cycle[i+1] - obs_cycle[i] != 3 || obs_state[i] != 16'(i + 1)) begin
        failures++; $display("short entry %0d held %0d", i, obs_cycle[i+1] - obs_cycle[i]);
      end
    end
    // the last state stays on the outputs
    checks++;
    if (state !== 16'h0004) begin failures++; $display("final state %h", state); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
