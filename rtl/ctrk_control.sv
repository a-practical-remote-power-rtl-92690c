// ctrk_control - run control of the kernel: starts and stops a run, paces the
// TDC sampling, decides when samples may be stored, and holds the trigger
// logic.
//
// A run starts on `start`: the Global Time and the trace RAM pointer are
// cleared and sampling begins, one sample strobe every SAMPLE_PERIOD cycles.
// What happens next depends on the mode:
//   free run     storing starts at once and lasts until `stop` or RAM full;
//                this is the long-term compressed trace.
//   hard trigger storing starts at the rising edge of the external trigger
//                wire (synchronised by two flip-flops) and lasts capture_len
//                cycles, or until full or stop.
//   auto trigger the embedded ctrk_auto_trigger watches the weights; storing
//                starts when it fires and lasts capture_len cycles (T2).
// capture_len = 0 means no time limit. The run then sits in DONE until the
// next start. The sampling period and the existence of a hard-wired and an
// automatic trigger follow the published kernel; the state machine, the mode
// encoding and the trigger synchroniser are this design's own.
//
// Timing: states change one cycle after their cause; the first sample strobe
// comes SAMPLE_PERIOD cycles after start.
module ctrk_control
  import ctrk_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              stop,
  input  ctrk_mode_e        mode,
  input  logic              ext_trig,
  input  logic              full,
  input  logic [31:0]       capture_len,
  // auto trigger settings and weight stream
  input  logic              hw_valid,
  input  logic [HW_W-1:0]   hw,
  input  logic [TIME_W-1:0] timestamp,
  input  logic [HW_W-1:0]   trig_level,
  input  logic [31:0]       trig_rearm,
  input  logic [3:0]        trig_drops,
  // outputs
  output ctrk_state_e       state,
  output logic              clear,
  output logic              sample_en,
  output logic              time_en,
  output logic              store_en,
  output logic              triggered,
  output logic              drop_start,
  output logic [3:0]        drop_count,
  output logic [TIME_W-1:0] first_drop_time,
  output logic [TIME_W-1:0] last_drop_time
);
  localparam int unsigned DW = (SAMPLE_PERIOD > 1) ? $clog2(SAMPLE_PERIOD) : 1;

  ctrk_mode_e  mode_q;
  logic [DW-1:0] div_cnt;
  logic [31:0] win_cnt;
  logic [2:0]  trig_sync;
  logic        ext_rise;
  logic        auto_fire;
  logic        running;

  assign running  = (state == ST_ARMED) || (state == ST_CAPTURE);
  assign time_en  = running;
  assign store_en = (state == ST_CAPTURE);
  assign clear    = start && !running;
  assign ext_rise = trig_sync[1] && !trig_sync[2];
  assign sample_en = running && (div_cnt == DW'(SAMPLE_PERIOD - 1));

  ctrk_auto_trigger u_auto (
    .clk, .rst,
    .clear,
    .arm            (state == ST_ARMED && mode_q == MODE_AUTO_TRIG),
    .in_valid       (hw_valid),
    .hw,
    .timestamp,
    .level          (trig_level),
    .rearm          (trig_rearm),
    .drops_needed   (trig_drops),
    .fire           (auto_fire),
    .drop_start,
    .drop_count,
    .in_drop        (),
    .first_drop_time,
    .last_drop_time
  );

  always_ff @(posedge clk) begin
    if (rst) trig_sync <= '0;
    else     trig_sync <= {trig_sync[1:0], ext_trig};
  end

  assign triggered = (state == ST_ARMED) &&
                     ((mode_q == MODE_HARD_TRIG && ext_rise) ||
                      (mode_q == MODE_AUTO_TRIG && auto_fire));

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_IDLE;
      mode_q  <= MODE_FREE_RUN;
      div_cnt <= '0;
      win_cnt <= '0;
    end else begin
      if (running) div_cnt <= sample_en ? '0 : div_cnt + 1'b1;
      else         div_cnt <= '0;

      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            mode_q  <= mode;
            win_cnt <= '0;
            state   <= (mode == MODE_FREE_RUN) ? ST_CAPTURE : ST_ARMED;
          end
        end
        ST_ARMED: begin
          if (stop)           state <= ST_DONE;
          else if (triggered) begin
            state   <= ST_CAPTURE;
            win_cnt <= '0;
          end
        end
        ST_CAPTURE: begin
          win_cnt <= win_cnt + 32'd1;
          if (stop || full)
            state <= ST_DONE;
          else if (mode_q != MODE_FREE_RUN && capture_len != '0 &&
                   win_cnt + 32'd1 >= capture_len)
            state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
