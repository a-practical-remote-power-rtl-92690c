// tb_ctrk_workloads - plays victim runs of the measured length against the
// kernel at its default sizes and measures the "preparation time": the gap
// between the first voltage drop (shell starts moving data into the custom
// logic) and the second (accelerator starts computing).
//
// Two victims, with the published preparation times at 125 MHz:
//   systolic array   1.3e6 cycles, deep drops at both events and a train of
//                    deep drops while computing;
//   vector addition  1.5e6 cycles, only shallow drops (too little logic to
//                    pull the supply down far).
// For each victim the testbench calibrates (threshold 256), sets the
// threshold just below the quietest noise reading, records a long-term
// compressed trace of 3.5e6 cycles and checks that it did not fill the RAM,
// that its entries are exactly the drop samples, and that the gap between the
// first entries of the two drop clusters, and between the port monitor's first
// transactions, equals the preparation time. It then arms the auto trigger:
// for the systolic array it must fire on the second drop and report the
// preparation time as DROP2_TIME - DROP1_TIME; for vector addition it must
// never fire.
module tb_ctrk_workloads;
  import ctrk_pkg::*;
  localparam int DEPTH = 16384;
  localparam int D1 = 400_000;             // first drop, cycles after start
  localparam int SPAN = 3_500_000;         // long-term trace length

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

  always #4 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- victim
  int  cyc = 0;
  bit  active;            // victim runs in this run
  int  prep;              // cycles from the first to the second drop
  int  depth_mv;          // depth of the victim's drops

  function automatic int volt(int c);
    int v = 850 + int'($urandom_range(0, 6)) - 3;
    if (!active) return v;
    if (c >= D1 && c < D1 + 200) v = 850 - depth_mv;                 // shell transfer
    if (c >= D1 + prep && c < D1 + prep + 24000 &&
        ((c - D1 - prep) % 2000) < 300) v = 850 - depth_mv;          // computation
    return v;
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    vccint_mv <= 16'(volt(cyc));
    mon_awvalid <= '0; mon_arvalid <= '0; mon_awready <= '1; mon_arready <= '1;
    if (active && cyc == D1) mon_awvalid <= 3'b011;               // PCIS, DDR writes
    if (active && cyc == D1 + prep) mon_arvalid <= 3'b110;        // DDR, OCL reads
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

  task automatic start_run(ctrk_mode_e m);
    @(negedge clk);
    s_axil_awaddr = REG_CTRL; s_axil_awvalid = 1'b1; s_axil_wvalid = 1'b1;
    s_axil_wdata = {24'd0, 4'd2, 2'(m), 2'b01};
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    cyc = -1;
    @(negedge clk) begin s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0; s_axil_bready = 1'b1; end
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk) s_axil_bready = 1'b0;
  endtask

  task automatic stop_run();
    wr(REG_CTRL, 32'h2);
  endtask

  // one victim: calibration, long-term trace, auto trigger
  task automatic victim(string name, int prep_cycles, int drop_mv, bit deep);
    logic [31:0] d, count, hw_r, t_r, t_first1, t_first2, d1, d2, thr;
    int min_w;
    int lowest;
    bit second;

    prep = prep_cycles; depth_mv = drop_mv;
    $display("INFO %s: preparation %0d cycles", name, prep);

    // calibration with the victim idle
    active = 1'b0;
    wr(REG_THRESHOLD, 32'd256);
    start_run(MODE_FREE_RUN);
    repeat (10000) @(negedge clk);
    stop_run();
    rd(REG_COUNT, count);
    min_w = 255;
    for (int i = 0; i < int'(count); i++) begin
      wr(REG_RD_ADDR, 32'(i));
      rd(REG_RD_HW, hw_r);
      if (int'(hw_r) < min_w) min_w = int'(hw_r);
    end
    thr = 32'(min_w);             // keep only readings below all idle noise
    $display("INFO %s: calibration %0d samples, quietest weight %0d", name, count, min_w);

    // long-term compressed trace of the victim run
    active = 1'b1;
    wr(REG_THRESHOLD, thr);
    start_run(MODE_FREE_RUN);
    while (cyc < SPAN) @(negedge clk);
    stop_run();
    rd(REG_STATUS, d);
    rd(REG_COUNT, count);
    $display("INFO %s: %0d entries stored over %0d cycles", name, count, SPAN);
    // drop samples: 200/5 at the shell transfer, 12 x 300/5 while computing
    check(!d[2] && int'(count) >= 40 + 12 * 60 - 4 && int'(count) <= 40 + 12 * 60 + 2,
          $sformatf("%s: trace holds the drop samples only (%0d)", name, count));
    second = 1'b0; lowest = 255;
    t_first1 = '1; t_first2 = '1;
    for (int i = 0; i < int'(count); i++) begin
      wr(REG_RD_ADDR, 32'(i));
      rd(REG_RD_HW, hw_r);
      rd(REG_RD_TIME, t_r);
      if (int'(hw_r) < lowest) lowest = int'(hw_r);
      if (i == 0) t_first1 = t_r;
      else if (!second && t_r > t_first1 + 32'(prep / 20)) begin
        second = 1'b1; t_first2 = t_r;
      end
    end
    check(t_first1 >= D1 / 10 && t_first1 <= D1 / 10 + 1,
          $sformatf("%s: first drop in the trace at %0d", name, t_first1));
    check(second && int'(t_first2 - t_first1) >= prep / 10 - 1 &&
          int'(t_first2 - t_first1) <= prep / 10 + 1,
          $sformatf("%s: preparation from the trace %0d ticks", name, t_first2 - t_first1));
    check(lowest == 160 - 2 * drop_mv, $sformatf("%s: deepest reading %0d", name, lowest));
    rd(REG_MON_BASE + 8'd0, d1);    // PCIS write
    rd(REG_MON_BASE + 8'd20, d2);   // OCL read
    check(int'(d2 - d1) >= prep / 10 - 1 && int'(d2 - d1) <= prep / 10 + 1,
          $sformatf("%s: preparation from the port monitor %0d ticks", name, d2 - d1));

    // auto trigger on the two drops
    wr(REG_THRESHOLD, 32'd256);
    wr(REG_TRIG_LEVEL, 32'd100);
    wr(REG_TRIG_REARM, 32'd64);
    wr(REG_CAPTURE_LEN, 32'd30000);
    start_run(MODE_AUTO_TRIG);
    while (state != ST_DONE && cyc < D1 + prep + 100000) @(negedge clk);
    if (deep) begin
      check(state == ST_DONE, $sformatf("%s: auto trigger fired and window closed", name));
      rd(REG_DROP1_TIME, d1);
      rd(REG_DROP2_TIME, d2);
      check(int'(d2 - d1) >= prep / 10 - 1 && int'(d2 - d1) <= prep / 10 + 1,
            $sformatf("%s: auto trigger preparation %0d ticks", name, d2 - d1));
      rd(REG_COUNT, count);
      check(int'(count) >= 5999 && int'(count) <= 6001,
            $sformatf("%s: captured %0d samples", name, count));
    end else begin
      rd(REG_STATUS, d);
      check(d[1:0] == 2'(ST_ARMED) && d[6:3] == 4'd0,
            $sformatf("%s: no drop deep enough to trigger (status %h)", name, d));
      stop_run();
    end
    active = 1'b0;
  endtask

  initial begin
    rst = 1'b1; ext_trig = 1'b0; active = 1'b0; prep = 0; depth_mv = 0;
    s_axil_awaddr = '0; s_axil_awvalid = 1'b0; s_axil_wdata = '0; s_axil_wvalid = 1'b0;
    s_axil_bready = 1'b0; s_axil_araddr = '0; s_axil_arvalid = 1'b0; s_axil_rready = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    victim("systolic array", 1_300_000, 45, 1'b1);
    victim("vector addition", 1_500_000, 10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
