// tb_ctrk_axil_regs - an AXI4-Lite master with random response back-pressure
// writes and reads every register: settings read back, start/stop become
// one-cycle pulses, and status, trace and port monitor inputs appear at their
// addresses.
module tb_ctrk_axil_regs;
  import ctrk_pkg::*;
  localparam int DEPTH = 16384;
  logic        clk = 1'b0, rst;
  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [1:0]  s_bresp, s_rresp;
  logic        start, stop, full;
  ctrk_mode_e  mode;
  logic [3:0]  trig_drops, drop_count;
  logic [31:0] threshold, trig_rearm, capture_len, drop1_time, drop2_time;
  logic [7:0]  trig_level;
  logic [13:0] rd_addr;
  ctrk_state_e state;
  logic [14:0] count;
  trace_entry_t rd_entry;
  logic [5:0]  mon_seen;
  logic [31:0] mon_time [6];
  int checks = 0, failures = 0;
  int starts = 0, stops = 0;

  ctrk_axil_regs dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && start) starts++;
    if (!rst && stop) stops++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1'b1; s_wdata = d; s_wvalid = 1'b1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk) begin s_awvalid = 1'b0; s_wvalid = 1'b0; end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_bready = 1'b1;
    do @(posedge clk); while (!s_bvalid);
    @(negedge clk) s_bready = 1'b0;
  endtask

  task automatic axi_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1'b1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_rready = 1'b1;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    @(negedge clk) s_rready = 1'b0;
  endtask

  task automatic expect_reg(logic [7:0] a, logic [31:0] e);
    logic [31:0] d;
    axi_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL reg %h read %h expected %h", a, d, e); end
  endtask

  initial begin
    rst = 1'b1;
    s_awaddr = '0; s_awvalid = 1'b0; s_wdata = '0; s_wvalid = 1'b0; s_bready = 1'b0;
    s_araddr = '0; s_arvalid = 1'b0; s_rready = 1'b0;
    state = ST_CAPTURE; full = 1'b1; drop_count = 4'd2; count = 15'd1234;
    rd_entry = '{timestamp: 32'hCAFE_0001, hw: 8'd77};
    drop1_time = 32'd111; drop2_time = 32'd222; mon_seen = 6'b101101;
    for (int e = 0; e < 6; e++) mon_time[e] = 32'(1000 * (e + 1));
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    expect_reg(REG_THRESHOLD, 32'd256);      // reset value keeps all samples
    axi_write(REG_THRESHOLD, 32'd150);
    axi_write(REG_TRIG_LEVEL, 32'd90);
    axi_write(REG_TRIG_REARM, 32'd500);
    axi_write(REG_CAPTURE_LEN, 32'd30000);
    axi_write(REG_RD_ADDR, 32'd4321);
    expect_reg(REG_THRESHOLD, 32'd150);
    expect_reg(REG_TRIG_LEVEL, 32'd90);
    expect_reg(REG_TRIG_REARM, 32'd500);
    expect_reg(REG_CAPTURE_LEN, 32'd30000);
    expect_reg(REG_RD_ADDR, 32'd4321);
    checks++;
    if (threshold != 150 || trig_level != 90 || trig_rearm != 500 ||
        capture_len != 30000 || rd_addr != 4321) begin
      failures++; $display("FAIL setting outputs");
    end

    // CTRL: mode 2, drops 3, start
    axi_write(REG_CTRL, 32'h0000_0039);
    repeat (2) @(negedge clk);
    checks++;
    if (mode != MODE_AUTO_TRIG || trig_drops != 3 || starts != 1 || stops != 0) begin
      failures++; $display("FAIL ctrl mode=%0d drops=%0d starts=%0d", mode, trig_drops, starts);
    end
    expect_reg(REG_CTRL, 32'h0000_0038);
    axi_write(REG_CTRL, 32'h0000_003A);   // stop
    repeat (2) @(negedge clk);
    checks++;
    if (stops != 1 || starts != 1) begin failures++; $display("FAIL stop pulse"); end
    repeat (5) @(negedge clk);
    checks++;
    if (start || stop) begin failures++; $display("FAIL pulses held"); end

    expect_reg(REG_STATUS, {25'd0, 4'd2, 1'b1, 2'(ST_CAPTURE)});
    expect_reg(REG_COUNT, 32'd1234);
    expect_reg(REG_RD_HW, 32'd77);
    expect_reg(REG_RD_TIME, 32'hCAFE_0001);
    expect_reg(REG_DROP1_TIME, 32'd111);
    expect_reg(REG_DROP2_TIME, 32'd222);
    expect_reg(REG_MON_VALID, 32'b101101);
    for (int e = 0; e < 6; e++) expect_reg(REG_MON_BASE + 8'(4 * e), 32'(1000 * (e + 1)));
    expect_reg(8'hFC, 32'd0);
    // a write to a read-only register changes nothing
    axi_write(REG_COUNT, 32'hFFFF_FFFF);
    expect_reg(REG_THRESHOLD, 32'd150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
