// ctrk_hamming_weight - Hamming weight (population count) of the 256-bit TDC
// sample, reduced to the 8-bit value the kernel stores.
//
// The number of ones in the thermometer code measures how far the clock edge
// travelled in the carry chain, hence the supply voltage. A full 256-bit count
// needs 9 bits (0..256), while the stored value is 8 bits; the one value that
// does not fit, 256, is saturated to 255. The count is split over two pipeline
// stages so that it fits in one 125 MHz cycle each: stage 1 counts the ones of
// each 16-bit group, stage 2 adds the group counts and saturates.
//
// Interface: in_valid/sample_in (from the sample register),
//            out_valid/hw (8-bit weight).
// Timing:    two cycles from in_valid to out_valid, one result per cycle.
//            The pipeline split and the saturation are this design's choices;
//            the 256-bit input and 8-bit output follow the published kernel.
module ctrk_hamming_weight #(
  parameter int unsigned TAPS  = 256,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned GROUP = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [TAPS-1:0]  sample_in,
  output logic             out_valid,
  output logic [OUT_W-1:0] hw
);
  localparam int unsigned NGROUPS = TAPS / GROUP;
  localparam int unsigned GCNT_W  = $clog2(GROUP + 1);
  localparam int unsigned SUM_W   = $clog2(TAPS + 1);
  localparam logic [SUM_W-1:0] MAXV = SUM_W'((1 << OUT_W) - 1);

  logic [GCNT_W-1:0] gcnt_d [NGROUPS];
  logic [GCNT_W-1:0] gcnt_q [NGROUPS];
  logic              v1;
  logic [SUM_W-1:0]  sum;

  // Stage 1: ones per group.
  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      gcnt_d[g] = '0;
      for (int b = 0; b < GROUP; b++)
        gcnt_d[g] = gcnt_d[g] + GCNT_W'(sample_in[g*GROUP + b]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      for (int g = 0; g < NGROUPS; g++) gcnt_q[g] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid)
        for (int g = 0; g < NGROUPS; g++) gcnt_q[g] <= gcnt_d[g];
    end
  end

  // Stage 2: sum of the groups, saturated to OUT_W bits.
  always_comb begin
    sum = '0;
    for (int g = 0; g < NGROUPS; g++) sum = sum + SUM_W'(gcnt_q[g]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      hw        <= '0;
    end else begin
      out_valid <= v1;
      if (v1) hw <= (sum > MAXV) ? OUT_W'(MAXV) : OUT_W'(sum);
    end
  end
endmodule
