// tb_ctrk_hamming_weight - checks the 8-bit Hamming weight against a reference
// count, including the saturation of 256 to 255, and the two-cycle latency.
module tb_ctrk_hamming_weight;
  logic         clk = 1'b0, rst, in_valid;
  logic [255:0] sample_in;
  logic         out_valid;
  logic [7:0]   hw;
  int checks = 0, failures = 0;
  int exp_q[$];

  ctrk_hamming_weight dut (.clk, .rst, .in_valid, .sample_in, .out_valid, .hw);

  always #4 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] pattern(int k);
    logic [255:0] v = '0;
    case (k % 6)
      0: v = '1;                                  // 256 ones -> 255
      1: v = '0;
      2: for (int i = 0; i < (k * 7) % 257; i++) v[i] = 1'b1;   // thermometer
      default: for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    endcase
    return v;
  endfunction

  int sent_cycle[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int e, c0;
      e  = exp_q.pop_front();
      c0 = sent_cycle.pop_front();
      checks++;
      if (hw !== 8'(e) || cyc - c0 != 2) begin
        failures++;
        $display("FAIL hw=%0d expected %0d latency %0d", hw, e, cyc - c0);
      end
    end
  end

  initial begin
    int n;
    rst = 1'b1; in_valid = 1'b0; sample_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      sample_in = pattern(k);
      if (in_valid) begin
        n = $countones(sample_in);
        exp_q.push_back(n > 255 ? 255 : n);
        sent_cycle.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
