// ctrk_trace_ram - block RAM that holds the compressed trace: one entry per
// stored sample, the 8-bit Hamming weight and its 32-bit timestamp.
//
// A simple dual-port memory: one synchronous write port used by the
// compare-and-store unit, one synchronous read port used by the host to read
// the trace back. Written as an array so that synthesis maps it to block RAM.
// The published kernel leaves its size tunable; 16384 entries of 40 bits
// (about 18 BRAM36 tiles) is this design's default.
//
// Interface: we/waddr/wdata (write port), raddr/rdata (read port).
// Timing:    a write takes effect at the clock edge; rdata shows the entry at
//            raddr one cycle after raddr is presented (read-first on a
//            same-address collision). Contents are not reset.
module ctrk_trace_ram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 40
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
