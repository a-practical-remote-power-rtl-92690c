// tb_ctrk_control - checks the run control: sample strobes every 5 cycles
// while running, the free-run, hard-trigger and auto-trigger modes, the
// capture window length, and the stop and RAM-full endings.
module tb_ctrk_control;
  import ctrk_pkg::*;
  logic        clk = 1'b0, rst, start, stop, ext_trig, full, hw_valid;
  ctrk_mode_e  mode;
  logic [31:0] capture_len, timestamp, trig_rearm;
  logic [7:0]  hw, trig_level;
  logic [3:0]  trig_drops, drop_count;
  ctrk_state_e state;
  logic        clear, sample_en, time_en, store_en, triggered, drop_start;
  logic [31:0] first_drop_time, last_drop_time;
  int checks = 0, failures = 0;
  int cyc = 0, last_sample = -1, capture_cycles;

  ctrk_control dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampling period and consistency of the outputs, checked every cycle
  always @(posedge clk) if (!rst) begin
    if (sample_en) begin
      if (last_sample >= 0) begin
        checks++;
        if (cyc - last_sample != 5) begin
          failures++; $display("FAIL sample period %0d", cyc - last_sample);
        end
      end
      last_sample = cyc;
    end
    if (!time_en) last_sample = -1;
    if (store_en) capture_cycles++;
    if (store_en !== (state == ST_CAPTURE) || time_en !== (state inside {ST_ARMED, ST_CAPTURE})) begin
      checks++; failures++; $display("FAIL output decode");
    end
  end

  task automatic pulse_start(ctrk_mode_e m);
    @(negedge clk) begin start = 1'b1; mode = m; end
    #1;
    checks++;
    if (!clear) begin failures++; $display("FAIL no clear on start"); end
    @(negedge clk) start = 1'b0;
  endtask

  task automatic expect_state(ctrk_state_e s, string what);
    checks++;
    if (state !== s) begin failures++; $display("FAIL %s: state %s", what, state.name()); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; stop = 1'b0; ext_trig = 1'b0; full = 1'b0;
    hw_valid = 1'b0; hw = 8'd160; mode = MODE_FREE_RUN; capture_len = 32'd100;
    timestamp = '0; trig_level = 8'd100; trig_rearm = 32'd4; trig_drops = 4'd2;
    capture_cycles = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_state(ST_IDLE, "after reset");

    // free run: capture until stop, ignoring capture_len
    pulse_start(MODE_FREE_RUN);
    expect_state(ST_CAPTURE, "free run start");
    repeat (300) @(negedge clk);
    expect_state(ST_CAPTURE, "free run ignores window");
    stop = 1'b1; @(negedge clk) stop = 1'b0;
    expect_state(ST_DONE, "free run stop");

    // free run ends on RAM full
    pulse_start(MODE_FREE_RUN);
    repeat (50) @(negedge clk);
    full = 1'b1; @(negedge clk) full = 1'b0;
    expect_state(ST_DONE, "full");

    // hard-wired trigger: armed until the wire rises, then a 100-cycle window
    pulse_start(MODE_HARD_TRIG);
    expect_state(ST_ARMED, "hard armed");
    repeat (200) @(negedge clk);
    expect_state(ST_ARMED, "hard waits");
    capture_cycles = 0;
    ext_trig = 1'b1;
    repeat (4) @(negedge clk);
    expect_state(ST_CAPTURE, "hard triggered");
    repeat (200) @(negedge clk);
    ext_trig = 1'b0;
    expect_state(ST_DONE, "hard window end");
    checks++;
    if (capture_cycles != 100) begin failures++; $display("FAIL window %0d cycles", capture_cycles); end

    // auto trigger: two drops in the weight stream
    capture_len = 32'd250;
    pulse_start(MODE_AUTO_TRIG);
    capture_cycles = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      hw_valid = 1'b1;
      timestamp = 32'(i);
      hw = ((i >= 50 && i < 60) || (i >= 150 && i < 160)) ? 8'd40 : 8'd160;
      if (i == 100) expect_state(ST_ARMED, "auto after first drop");
    end
    @(negedge clk) hw_valid = 1'b0;
    checks++;
    if (drop_count != 2 || first_drop_time != 50 || last_drop_time != 150) begin
      failures++; $display("FAIL auto drops %0d %0d %0d", drop_count, first_drop_time, last_drop_time);
    end
    repeat (200) @(negedge clk);
    expect_state(ST_DONE, "auto window end");
    checks++;
    if (capture_cycles != 250) begin failures++; $display("FAIL auto window %0d", capture_cycles); end

    // stop while armed
    pulse_start(MODE_AUTO_TRIG);
    repeat (20) @(negedge clk);
    stop = 1'b1; @(negedge clk) stop = 1'b0;
    expect_state(ST_DONE, "stop while armed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
