// ctrk_sample_reg - the "Sample" register between the TDC flip-flops and the
// Hamming weight unit.
//
// The TDC flip-flops change every clock cycle; the kernel looks at them only
// once per sampling period (every 5 cycles in the published kernel). This
// register takes a copy of all 256 taps when sample_en is high and holds it
// for the Hamming weight unit, and raises sample_valid for one cycle with it.
//
// Interface: sample_en (one-cycle strobe from the control), taps_in (TDC
//            flip-flops), sample/sample_valid (held copy and its strobe).
// Timing:    one cycle: the taps present at the edge where sample_en is high
//            appear on sample at the next cycle, with sample_valid high.
//            The register is cleared by the synchronous reset.
module ctrk_sample_reg #(
  parameter int unsigned TAPS = 256
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sample_en,
  input  logic [TAPS-1:0] taps_in,
  output logic [TAPS-1:0] sample,
  output logic            sample_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= sample_en;
      if (sample_en) sample <= taps_in;
    end
  end
endmodule
