// ctrk_compare_store - the "Compare & Store" unit: keeps a TDC sample only if
// its Hamming weight is below the threshold, and writes it with its timestamp
// to the next free trace RAM entry.
//
// Random noise makes most samples uninformative, while the voltage drops of
// interest are rare and pull the weight down. Storing only weights below the
// threshold (hw < threshold) therefore compresses the trace. The threshold is
// 32 bits wide, so a threshold of 256 (above any 8-bit weight) keeps every
// sample; that is how a first calibration run records the full trace from
// which the average used as threshold for the real run is computed. Writing
// stops when the RAM is full; full stays high until clear.
//
// Interface: clear (restart at entry 0), store_en (storing allowed, from the
//            control), in_valid/hw (weight from the Hamming weight unit),
//            timestamp (Global Time), threshold, RAM write port, count
//            (entries written), full, stored/skipped (one-cycle event strobes).
// Timing:    the RAM write is issued combinationally in the cycle in_valid is
//            high and takes effect at that clock edge; count and full update
//            at the same edge.
module ctrk_compare_store
  import ctrk_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     store_en,
  input  logic                     in_valid,
  input  logic [HW_W-1:0]          hw,
  input  logic [TIME_W-1:0]        timestamp,
  input  logic [THRESH_W-1:0]      threshold,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output trace_entry_t             wdata,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full,
  output logic                     stored,
  output logic                     skipped
);
  logic below;

  assign below   = THRESH_W'(hw) < threshold;
  assign full    = (count == ($clog2(DEPTH) + 1)'(DEPTH));
  assign we      = in_valid && store_en && !full && below;
  assign stored  = we;
  assign skipped = in_valid && store_en && !full && !below;
  assign waddr   = count[$clog2(DEPTH)-1:0];
  assign wdata   = '{timestamp: timestamp, hw: hw};

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (we)      count <= count + 1'b1;
  end
endmodule
