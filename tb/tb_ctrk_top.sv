// tb_ctrk_top - end-to-end test of the Compressed TDC RTL Kernel at its
// default sizes (256-tap TDC, 16384-entry trace RAM, 5-cycle sampling,
// 10-cycle timestamps), driven only through its AXI4-Lite port, the supply
// voltage seen by the TDC model, the trigger wire and the watched shell ports.
//
// The testbench plays a co-tenant victim: supply noise of a few millivolts, a
// short deep drop when the shell starts moving data (with PCIS and DDR
// transactions), and later a train of drops while the accelerator computes
// (with DDR and OCL transactions). It then runs the measurement procedure:
//   1. calibration: free run with threshold 256, every sample kept; the
//      average weight of the trace becomes the threshold;
//   2. long-term trace: free run with that threshold until the RAM is full;
//   3. hard-wired trigger: a 30000-cycle window opened by the trigger wire;
//   4. auto trigger: the same window opened by the second voltage drop.
// Every stored entry is read back and compared with weights computed here
// from the applied voltage; timestamps, drop times and port times are checked
// against the testbench's own cycle count. Each mechanism is counted and must
// occur at least once.
module tb_ctrk_top;
  import ctrk_pkg::*;
  localparam int DEPTH = 16384;

  logic        clk = 1'b0, rst;
  logic [15:0] vccint_mv;
  logic        ext_trig;
  logic [7:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [2:0]  mon_awvalid, mon_awready, mon_arvalid, mon_arready;
  ctrk_state_e state;
  logic        sample_strobe, hw_valid, stored, skipped, triggered, drop_start, full;
  logic [7:0]  hw;

  ctrk_top dut (.*);

  always #4 clk = ~clk;      // 125 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stored = 0, n_skipped = 0, n_full = 0, n_stop = 0, n_hard = 0, n_auto = 0;
  int n_drop = 0, n_sat = 0, n_port = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- victim
  int cyc = 0;            // cycles since the current run started
  int drop1_at, drop2_at; // victim schedule for this run, -1 = none
  bit high_v;             // push the voltage high (weight saturation)

  function automatic int volt(int c);
    int v = 850 + int'($urandom_range(0, 6)) - 3;
    if (high_v && (c % 1000) < 5) v = 960;
    if (drop1_at >= 0 && c >= drop1_at && c < drop1_at + 200) v = 805;
    if (drop2_at >= 0 && c >= drop2_at && c < drop2_at + 24000 &&
        ((c - drop2_at) % 2000) < 300) v = 805;
    return v;
  endfunction

  function automatic int weight(int mv);
    int n = 160 + 2 * (mv - 850);
    if (n < 0) n = 0;
    if (n > 255) n = 255;
    return n;
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    vccint_mv <= 16'(volt(cyc));
  end

  // shell port activity at the victim's drops
  always @(negedge clk) begin
    mon_awvalid <= '0; mon_arvalid <= '0; mon_awready <= '1; mon_arready <= '1;
    if (drop1_at >= 0 && cyc == drop1_at) mon_awvalid <= 3'b011;         // PCIS, DDR writes
    if (drop2_at >= 0 && cyc == drop2_at) begin
      mon_arvalid <= 3'b110;                                             // DDR, OCL reads
      mon_awvalid <= 3'b100;                                             // OCL write
    end
  end

  // expected weight of each sample: the sample register takes the TDC
  // flip-flops, which hold the voltage applied one cycle earlier
  int exp_w[$];           // weights of all samples of the run, in order
  int exp_cyc[$];         // run cycle of each sample
  int v_last = 850;
  always @(posedge clk) begin
    if (sample_strobe) begin
      exp_w.push_back(weight(v_last));
      exp_cyc.push_back(cyc);
      if (weight(v_last) == 255 && v_last >= 898) n_sat++;
    end
    v_last = int'(vccint_mv);
    if (stored) n_stored++;
    if (skipped) n_skipped++;
    if (drop_start) n_drop++;
  end

  // ---------------------------------------------------------------- AXI host
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1; s_axil_wdata = d; s_axil_wvalid = 1'b1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    @(negedge clk) begin s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0; s_axil_bready = 1'b1; end
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk) s_axil_bready = 1'b0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1'b1;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk) begin s_axil_arvalid = 1'b0; s_axil_rready = 1'b1; end
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk) s_axil_rready = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // start a run: the run's cycle count restarts with the start pulse
  task automatic start_run(ctrk_mode_e m);
    exp_w.delete(); exp_cyc.delete();
    @(negedge clk);
    s_axil_awaddr = REG_CTRL; s_axil_awvalid = 1'b1; s_axil_wvalid = 1'b1;
    s_axil_wdata = {24'd0, 4'd2, 2'(m), 2'b01};
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    cyc = -1;   // the start pulse is seen by the control in the next cycle
    @(negedge clk) begin s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0; s_axil_bready = 1'b1; end
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk) s_axil_bready = 1'b0;
  endtask

  task automatic wait_done(int max_cycles);
    int n = 0;
    while (state != ST_DONE && n < max_cycles) begin @(negedge clk); n++; end
    check(state == ST_DONE, "run did not end");
  endtask

  // Read back `count` entries and compare with the samples of exp_w[first..]
  // that are below `thr`. Returns the sum of the weights read.
  task automatic verify_trace(int count, int first, int thr, output longint sum);
    logic [31:0] d_hw, d_t;
    int k = first;
    int bad = 0;
    sum = 0;
    for (int i = 0; i < count; i++) begin
      while (k < exp_w.size() && exp_w[k] >= thr) k++;
      wr(REG_RD_ADDR, 32'(i));
      rd(REG_RD_HW, d_hw);
      rd(REG_RD_TIME, d_t);
      sum += d_hw;
      if (k >= exp_w.size() || int'(d_hw) != exp_w[k] ||
          int'(d_t) < exp_cyc[k] / 10 || int'(d_t) > exp_cyc[k] / 10 + 1) begin
        if (bad < 5)
          $display("FAIL entry %0d: hw %0d t %0d, expected hw %0d near t %0d", i, d_hw, d_t,
                   (k < exp_w.size()) ? exp_w[k] : -1, (k < exp_cyc.size()) ? exp_cyc[k] / 10 : -1);
        bad++;
      end
      k++;
    end
    check(bad == 0, "trace contents");
  endtask

  // index of the first sample taken at or after run cycle c
  function automatic int sample_at(int c);
    foreach (exp_cyc[i]) if (exp_cyc[i] >= c) return i;
    return exp_cyc.size();
  endfunction

  initial begin
    logic [31:0] d, count;
    longint sum;
    int t_ave, first, win_samples;

    rst = 1'b1; ext_trig = 1'b0; drop1_at = -1; drop2_at = -1; high_v = 1'b0;
    s_axil_awaddr = '0; s_axil_awvalid = 1'b0; s_axil_wdata = '0; s_axil_wvalid = 1'b0;
    s_axil_bready = 1'b0; s_axil_araddr = '0; s_axil_arvalid = 1'b0; s_axil_rready = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // ---- 1. calibration run: threshold 256 keeps every sample
    high_v = 1'b1;
    wr(REG_THRESHOLD, 32'd256);
    start_run(MODE_FREE_RUN);
    repeat (10000) @(negedge clk);
    wr(REG_CTRL, 32'h2);            // stop
    repeat (5) @(negedge clk);
    check(state == ST_DONE, "stop ends a free run");
    if (state == ST_DONE) n_stop++;
    rd(REG_COUNT, count);
    // samples whose weight reached the RAM before the stop
    check(int'(count) >= exp_w.size() - 3 && int'(count) <= exp_w.size(),
          $sformatf("calibration keeps every sample: %0d of %0d", count, exp_w.size()));
    verify_trace(int'(count), 0, 256, sum);
    t_ave = int'(sum / longint'(count));
    $display("INFO calibration: %0d samples, average weight %0d", count, t_ave);
    check(t_ave > 150 && t_ave < 175, "average weight");
    high_v = 1'b0;

    // ---- 2. long-term compressed trace, until the RAM is full
    drop1_at = 20000; drop2_at = 60000;
    wr(REG_THRESHOLD, 32'(t_ave));
    start_run(MODE_FREE_RUN);
    wait_done(400000);
    rd(REG_COUNT, count);
    rd(REG_STATUS, d);
    check(int'(count) == DEPTH && d[2], "RAM full ends the run");
    if (d[2]) n_full++;
    verify_trace(DEPTH, 0, t_ave, sum);
    // port monitor: first transactions at the victim's drops
    rd(REG_MON_VALID, d);
    // event 2*port+dir: PCIS write (0) and DDR write (2) at the first drop,
    // DDR read (3), OCL write (4) and OCL read (5) at the second
    check(d[5:0] == 6'b111101, $sformatf("port events seen %b", d[5:0]));
    for (int e = 0; e < 6; e++) begin
      int at;
      at = (e < 3) ? 20000 : 60000;
      if (!d[e]) continue;
      n_port++;
      rd(REG_MON_BASE + 8'(4 * e), count);
      check(int'(count) >= at / 10 - 1 && int'(count) <= at / 10 + 1,
            $sformatf("port event %0d time %0d", e, count));
    end

    // ---- 3. hard-wired trigger, 30000-cycle window
    drop1_at = -1; drop2_at = 5000;
    wr(REG_THRESHOLD, 32'd256);
    wr(REG_CAPTURE_LEN, 32'd30000);
    start_run(MODE_HARD_TRIG);
    while (cyc < 5000) @(negedge clk);
    ext_trig = 1'b1;
    wait_done(40000);
    ext_trig = 1'b0;
    if (state == ST_DONE) n_hard++;
    rd(REG_COUNT, count);
    check(int'(count) >= 5999 && int'(count) <= 6001,
          $sformatf("hard-trigger window holds %0d samples", count));
    first = sample_at(5000);
    // the window opens after the trigger synchroniser and the pipeline
    while (first < exp_w.size() && exp_cyc[first] < 5000 + 2) first++;
    verify_trace(int'(count), first, 256, sum);

    // ---- 4. auto trigger: first drop at T0, second after T1, window T2
    drop1_at = 12000; drop2_at = 52000;
    wr(REG_TRIG_LEVEL, 32'd100);
    wr(REG_TRIG_REARM, 32'd64);
    wr(REG_CAPTURE_LEN, 32'd30000);
    start_run(MODE_AUTO_TRIG);
    while (cyc < 30000) @(negedge clk);
    rd(REG_STATUS, d);
    check(d[1:0] == 2'(ST_ARMED) && d[6:3] == 4'd1, "armed after the first drop");
    wait_done(100000);
    if (state == ST_DONE) n_auto++;
    rd(REG_DROP1_TIME, d);
    check(int'(d) >= 1200 && int'(d) <= 1202, $sformatf("first drop time %0d", d));
    rd(REG_DROP2_TIME, d);
    check(int'(d) >= 5200 && int'(d) <= 5202, $sformatf("second drop time %0d", d));
    rd(REG_COUNT, count);
    check(int'(count) >= 5999 && int'(count) <= 6001,
          $sformatf("auto-trigger window holds %0d samples", count));
    first = sample_at(52000);
    while (first < exp_w.size() && exp_w[first] >= 100) first++;
    verify_trace(int'(count), first + 1, 256, sum);

    // ---- every mechanism must have happened
    $display("INFO stored=%0d skipped=%0d full=%0d stop=%0d hard=%0d auto=%0d drops=%0d saturated=%0d port_events=%0d",
             n_stored, n_skipped, n_full, n_stop, n_hard, n_auto, n_drop, n_sat, n_port);
    check(n_stored > 0, "samples stored");
    check(n_skipped > 0, "samples skipped by the threshold");
    check(n_full > 0, "RAM full");
    check(n_stop > 0, "stop");
    check(n_hard > 0, "hard-wired trigger");
    check(n_auto > 0, "auto trigger");
    check(n_drop >= 2, "drops detected");
    check(n_sat > 0, "weight saturation");
    check(n_port == 5, "port monitor events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
