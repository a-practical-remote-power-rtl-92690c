// tb_ctrk_port_monitor - generates AXI AW/AR handshakes on the three watched
// ports at random times and checks that only the first of each kind is
// timestamped, that nothing is recorded while disabled, and that clear
// forgets everything.
module tb_ctrk_port_monitor;
  logic        clk = 1'b0, rst, clear, en;
  logic [31:0] timestamp;
  logic [2:0]  awvalid, awready, arvalid, arready;
  logic [5:0]  seen;
  logic [31:0] first_time [6];
  logic [31:0] exp_time [6];
  logic [5:0]  exp_seen;
  int checks = 0, failures = 0;

  ctrk_port_monitor dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycles(int n, bit enable);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      en = enable;
      timestamp = timestamp + 1;
      awvalid = 3'($urandom_range(0, 7)) & {3{$urandom_range(0, 9) == 0}};
      awready = 3'($urandom_range(0, 7));
      arvalid = 3'($urandom_range(0, 7)) & {3{$urandom_range(0, 9) == 0}};
      arready = 3'($urandom_range(0, 7));
      if (enable)
        for (int p = 0; p < 3; p++) begin
          if (awvalid[p] && awready[p] && !exp_seen[2*p]) begin
            exp_seen[2*p] = 1'b1; exp_time[2*p] = timestamp;
          end
          if (arvalid[p] && arready[p] && !exp_seen[2*p+1]) begin
            exp_seen[2*p+1] = 1'b1; exp_time[2*p+1] = timestamp;
          end
        end
      @(posedge clk); #1;
      checks++;
      if (seen !== exp_seen) begin
        failures++; $display("FAIL seen=%b expected %b", seen, exp_seen);
      end
      for (int e = 0; e < 6; e++) begin
        checks++;
        if (exp_seen[e] && first_time[e] !== exp_time[e]) begin
          failures++; $display("FAIL event %0d time %0d expected %0d", e, first_time[e], exp_time[e]);
        end
      end
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0; timestamp = '0;
    awvalid = '0; awready = '0; arvalid = '0; arready = '0;
    exp_seen = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cycles(100, 1'b0);      // disabled
    cycles(600, 1'b1);
    checks++;
    if (exp_seen != 6'h3f) begin failures++; $display("FAIL not all events seen"); end
    @(negedge clk) clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    exp_seen = '0;
    checks++;
    if (seen !== '0) begin failures++; $display("FAIL clear"); end
    cycles(300, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
