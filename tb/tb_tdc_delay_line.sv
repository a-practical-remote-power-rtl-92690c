// tb_tdc_delay_line - checks the behavioural TDC model: after each clock edge
// the taps must hold a thermometer code whose number of ones follows the
// model's linear voltage law, clamped at 0 and 256, and it must rise with the
// supply voltage.
module tb_tdc_delay_line;
  logic         clk = 1'b0;
  logic [15:0]  vccint_mv;
  logic [255:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line dut (.clk, .vccint_mv, .taps);

  always #4 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int mv);
    int n = 160 + 2 * (mv - 850);
    if (n < 0) n = 0;
    if (n > 256) n = 256;
    return n;
  endfunction

  task automatic apply(int mv);
    logic [255:0] exp_taps;
    int n;
    vccint_mv = 16'(mv);
    @(posedge clk); #1;
    n = expected(mv);
    exp_taps = '0;
    for (int i = 0; i < n; i++) exp_taps[i] = 1'b1;
    checks++;
    if (taps !== exp_taps) begin
      failures++;
      $display("FAIL mv=%0d ones=%0d expected %0d", mv, $countones(taps), n);
    end
  endtask

  initial begin
    int prev;
    vccint_mv = 16'd850;
    @(posedge clk);
    apply(850); apply(800); apply(900); apply(700); apply(1000); apply(771);
    for (int k = 0; k < 50; k++) apply(760 + int'($urandom_range(0, 120)));
    // monotonic: more voltage, more ones
    prev = -1;
    for (int mv = 780; mv <= 920; mv += 5) begin
      apply(mv);
      checks++;
      if ($countones(taps) < prev) begin
        failures++;
        $display("FAIL not monotonic at %0d mV", mv);
      end
      prev = $countones(taps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
