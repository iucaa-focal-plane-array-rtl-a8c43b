// tb_wave_table_ram: writes a pseudo-random pattern into every word of a
// 1 K x 16 table, reads it back through the synchronous port and checks the
// one-cycle read latency and the data against a reference copy.
module tb_wave_table_ram;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0;
  logic we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  wave_table_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = 16'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read back in a scrambled order; data is checked one clock later
    for (int k = 0; k < DEPTH; k++) begin
      int a;
      a = (k * 337 + 11) % DEPTH;
      @(negedge clk); raddr = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("word %0d: got %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    // write and read of the same word in one cycle returns the old data
    @(negedge clk); we = 1; waddr = 10'd5; raddr = 10'd5; wdata = ~ref_mem[5];
    @(posedge clk); #1; we = 0;
    checks++;
    if (rdata !== ref_mem[5]) begin failures++; $display("read-during-write mismatch"); end
    @(posedge clk); #1;
    checks++;
    if (rdata !== ~ref_mem[5]) begin failures++; $display("written word not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
