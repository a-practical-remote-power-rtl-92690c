// ctrk_auto_trigger - starts a trace capture from the TDC readings alone, with
// no wire from the victim.
//
// A victim run shows two deep voltage drops: the first when the shell starts
// moving data to the custom logic, the second when the accelerator starts
// computing. The trigger watches every Hamming weight while armed. A drop
// begins at the first weight below `level`; the drop is over once `rearm`
// consecutive weights have been at or above `level` again, so that the many
// low samples of one drop are counted once. When the drop that begins is the
// `drops_needed`-th one (2 for the two-drop pattern), fire pulses and the
// control opens the capture window. The timestamps at which the first and the
// latest drop began are kept, giving the durations T0 (start to first drop) and
// T1 (first to second drop) of the measurement.
//
// The two-drop detection with a level threshold follows the published attack;
// the re-arm rule and the programmable drop count are this design's own.
//
// Interface: clear (forget all drops, start of a run), arm (watch while
//            high; while low the state is held), in_valid/hw
//            (weights), timestamp, level, rearm, drops_needed; fire (one-cycle
//            pulse), drop_start (pulse at every drop), drop_count, in_drop,
//            first_drop_time, last_drop_time.
// Timing:    fire and drop_start are combinational in the cycle of the
//            sample that begins the drop; the counters update at that edge.
module ctrk_auto_trigger
  import ctrk_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              arm,
  input  logic              in_valid,
  input  logic [HW_W-1:0]   hw,
  input  logic [TIME_W-1:0] timestamp,
  input  logic [HW_W-1:0]   level,
  input  logic [31:0]       rearm,
  input  logic [3:0]        drops_needed,
  output logic              fire,
  output logic              drop_start,
  output logic [3:0]        drop_count,
  output logic              in_drop,
  output logic [TIME_W-1:0] first_drop_time,
  output logic [TIME_W-1:0] last_drop_time
);
  logic        fired;
  logic        low;
  logic [31:0] above_cnt;

  assign low        = hw < level;
  assign drop_start = arm && !fired && in_valid && low && !in_drop;
  assign fire       = drop_start && ((drop_count + 4'd1) >= drops_needed);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      fired           <= 1'b0;
      in_drop         <= 1'b0;
      drop_count      <= '0;
      above_cnt       <= '0;
      first_drop_time <= '0;
      last_drop_time  <= '0;
    end else if (arm && in_valid && !fired) begin
      if (low) begin
        above_cnt <= '0;
        if (!in_drop) begin
          in_drop        <= 1'b1;
          drop_count     <= drop_count + 4'd1;
          last_drop_time <= timestamp;
          if (drop_count == '0) first_drop_time <= timestamp;
          if (fire) fired <= 1'b1;
        end
      end else if (in_drop) begin
        if (above_cnt + 32'd1 >= rearm) begin
          in_drop   <= 1'b0;
          above_cnt <= '0;
        end else begin
          above_cnt <= above_cnt + 32'd1;
        end
      end
    end
  end
endmodule
