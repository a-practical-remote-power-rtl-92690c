// tdc_delay_line - BEHAVIOURAL MODEL (not synthesizable as a sensor) of the
// carry-chain time-to-digital converter: 32 CARRY8 elements in a row, 256 taps,
// each tap followed by a flip-flop.
//
// On the FPGA the clock is fed into the carry input of the first CARRY8 and
// ripples up the chain; at the next rising clock edge the 256 flip-flops
// capture how far it got, giving a thermometer code. A higher supply voltage
// shortens the carry delay, so more taps read 1. That delay is an analog
// property of the silicon that logic cannot express, so this model replaces it
// with an input, vccint_mv, standing for the local supply voltage in
// millivolts, and a linear delay law: the number of taps reached is
// N_NOM + TAPS_PER_MV * (vccint_mv - V_NOM_MV), clamped to 0..TAPS. The
// structure (32 CARRY8, 256 flip-flops, clock as the propagating signal) follows
// the published sensor; the voltage law and its constants are this model's own.
//
// Interface: clk (sampling clock, also the signal sent into the chain),
//            vccint_mv (model-only stand-in for the supply node),
//            taps (256 capture flip-flops, tap 0 nearest the chain input).
// Timing:    taps is updated on every rising edge of clk from the voltage seen
//            just before that edge, i.e. one register stage.
module tdc_delay_line #(
  parameter int unsigned CARRY8_COUNT = 32,
  parameter int          V_NOM_MV     = 850,   // UltraScale+ VCCINT nominal
  parameter int          N_NOM        = 160,   // taps reached at V_NOM_MV
  parameter int          TAPS_PER_MV  = 2
) (
  input  logic                        clk,
  input  logic [15:0]                 vccint_mv,
  output logic [CARRY8_COUNT*8-1:0]   taps
);
  localparam int TAPS = int'(CARRY8_COUNT) * 8;

  int reach;   // taps the clock edge travels through in one period

  always_comb begin
    reach = N_NOM + TAPS_PER_MV * (int'(vccint_mv) - V_NOM_MV);
    if (reach < 0)    reach = 0;
    if (reach > TAPS) reach = TAPS;
  end

  // Capture flip-flops: tap i reads 1 when the edge got past CARRY8 output i.
  always_ff @(posedge clk) begin
    for (int i = 0; i < TAPS; i++) taps[i] <= (i < reach);
  end

endmodule
