// wave_table_ram: one waveform table, DEPTH words of WIDTH bits.
//
// Each table holds state/time pairs: the even word of a pair is the 16 bit
// waveform state, the odd word the time it is held for (in 10 ns units), so
// the default 1 K words hold up to 512 entries. The host fills it through the
// write port; the waveform player reads it through the synchronous read port
// (data appears one clock after the address). Depth and width follow the
// controller's 1 K word per table memory; the single write port plus single
// read port organisation (a simple dual-port block RAM) is this design's
// choice. Contents are not reset.
module wave_table_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
