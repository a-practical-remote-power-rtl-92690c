// tb_ctrk_global_time - checks that the Global Time advances once every 10
// enabled cycles, holds while disabled and restarts from zero on clear.
module tb_ctrk_global_time;
  logic        clk = 1'b0, rst, clear, en;
  logic [31:0] time_o;
  logic        tick;
  int checks = 0, failures = 0;
  int en_cycles;

  ctrk_global_time dut (.clk, .rst, .clear, .en, .time_o, .tick);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    en_cycles = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      en    = (c < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      clear = (c == 2000);
      @(posedge clk); #1;
      if (clear) en_cycles = 0;
      else if (en) en_cycles++;
      checks++;
      if (time_o !== 32'(en_cycles / 10)) begin
        failures++;
        $display("FAIL cycle %0d time=%0d expected %0d", c, time_o, en_cycles / 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
