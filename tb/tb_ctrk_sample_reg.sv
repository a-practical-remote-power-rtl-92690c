// tb_ctrk_sample_reg - checks that the sample register copies the taps only on
// a sample strobe, holds them otherwise, and flags the copy for one cycle.
module tb_ctrk_sample_reg;
  logic         clk = 1'b0, rst, sample_en;
  logic [255:0] taps_in, sample, held;
  logic         sample_valid;
  int checks = 0, failures = 0;

  ctrk_sample_reg dut (.clk, .rst, .sample_en, .taps_in, .sample, .sample_valid);

  always #4 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    rst = 1'b1; sample_en = 1'b0; taps_in = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    held = '0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      taps_in   = rnd256();
      sample_en = (c % 5 == 4);
      @(posedge clk); #1;
      if (sample_en) held = taps_in;
      checks++;
      if (sample !== held || sample_valid !== sample_en) begin
        failures++;
        $display("FAIL cycle %0d en=%0b valid=%0b", c, sample_en, sample_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
