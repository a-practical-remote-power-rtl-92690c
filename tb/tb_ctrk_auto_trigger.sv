// tb_ctrk_auto_trigger - feeds the auto trigger a synthetic weight stream with
// noise and deep drops at known places, and checks that it counts each drop
// once, fires at the start of the second drop, records both drop times,
// ignores everything after firing or while disarmed, and forgets on clear.
module tb_ctrk_auto_trigger;
  logic        clk = 1'b0, rst, clear, arm, in_valid;
  logic [7:0]  hw, level;
  logic [31:0] timestamp, rearm;
  logic [3:0]  drops_needed, drop_count;
  logic        fire, drop_start, in_drop;
  logic [31:0] first_drop_time, last_drop_time;
  int checks = 0, failures = 0;
  int fires, starts, fire_idx;

  ctrk_auto_trigger dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (fire) fires++;
    if (drop_start) starts++;
  end

  // Weight of sample i: noise 150..170, with drops made of several low samples
  // separated by short recoveries inside the drop.
  function automatic int weight(int i, int d1, int d2);
    if ((i >= d1 && i < d1 + 20) || (i >= d2 && i < d2 + 20))
      return ((i % 4) == 1) ? 160 : 60 + (i % 10);   // dips with brief rebounds
    return 150 + (i % 21);
  endfunction

  task automatic stream(int n, int d1, int d2);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid  = 1'b1;
      hw        = 8'(weight(i, d1, d2));
      timestamp = 32'(1000 + i);
      #1;
      if (fire) fire_idx = i;
    end
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; arm = 1'b0; in_valid = 1'b0; hw = '0; timestamp = '0;
    level = 8'd100; rearm = 32'd8; drops_needed = 4'd2;
    fires = 0; starts = 0; fire_idx = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // disarmed: nothing happens
    stream(300, 50, 200);
    checks++;
    if (fires != 0 || starts != 0 || drop_count != 0) begin
      failures++; $display("FAIL activity while disarmed");
    end

    // armed: drops at 100 and 400, a third at 700 must be ignored
    @(negedge clk) arm = 1'b1;
    stream(1000, 100, 400);
    checks++;
    if (fires != 1 || fire_idx != 400) begin
      failures++; $display("FAIL fires=%0d at %0d", fires, fire_idx);
    end
    checks++;
    if (starts != 2 || drop_count != 2) begin
      failures++; $display("FAIL drop starts=%0d count=%0d", starts, drop_count);
    end
    checks++;
    if (first_drop_time != 1100 || last_drop_time != 1400) begin
      failures++; $display("FAIL times %0d %0d", first_drop_time, last_drop_time);
    end
    // after firing, further drops are ignored
    stream(100, 10, 50);
    checks++;
    if (fires != 1 || drop_count != 2) begin
      failures++; $display("FAIL activity after firing");
    end

    // re-arm with a single-drop trigger
    @(negedge clk) begin arm = 1'b0; clear = 1'b1; end
    @(negedge clk) begin clear = 1'b0; arm = 1'b1; drops_needed = 4'd1; end
    fires = 0; fire_idx = -1;
    stream(300, 30, 250);
    checks++;
    if (fires != 1 || fire_idx != 30 || first_drop_time != 1030) begin
      failures++; $display("FAIL one-drop trigger fires=%0d idx=%0d", fires, fire_idx);
    end

    // a rearm longer than the gap merges two drops into one
    @(negedge clk) begin arm = 1'b0; clear = 1'b1; end
    @(negedge clk) begin clear = 1'b0; arm = 1'b1; drops_needed = 4'd2; rearm = 32'd200; end
    fires = 0; starts = 0;
    stream(400, 100, 150);
    checks++;
    if (fires != 0 || starts != 1) begin
      failures++; $display("FAIL merged drops fires=%0d starts=%0d", fires, starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
