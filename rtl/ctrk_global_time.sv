// ctrk_global_time - the kernel's timestamp counter ("Global Time").
//
// A 32-bit counter that advances by one every 10 clock cycles while enabled.
// At 125 MHz one tick is 80 ns, and the 32-bit value wraps after
// 2^32 * 80 ns, about 5.7 minutes. A prescaler counts the cycles between
// ticks. clear (synchronous) sets both the prescaler and the count to zero,
// so that time 0 is the start of a run.
//
// Interface: clear, en (count while high), time_o (current timestamp),
//            tick (high in the cycle the count advances).
// Timing:    time_o advances one cycle after the DIV-th enabled cycle
//            following clear. DIV and WIDTH follow the published kernel.
module ctrk_global_time #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DIV   = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  output logic [WIDTH-1:0] time_o,
  output logic             tick
);
  localparam int unsigned PW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [PW-1:0] pre;

  assign tick = en && (pre == PW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      pre    <= '0;
      time_o <= '0;
    end else if (en) begin
      if (tick) begin
        pre    <= '0;
        time_o <= time_o + 1'b1;
      end else begin
        pre <= pre + 1'b1;
      end
    end
  end
endmodule
