// tb_ctrk_trace_ram - writes random entries at random addresses of the trace
// RAM and reads them back, checking the one-cycle read latency against a
// reference memory.
module tb_ctrk_trace_ram;
  localparam int DEPTH = 16384;
  logic        clk = 1'b0, we;
  logic [13:0] waddr, raddr;
  logic [39:0] wdata, rdata;
  logic [39:0] ref_mem [DEPTH];
  bit          written [DEPTH];
  int checks = 0, failures = 0;

  ctrk_trace_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] a;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill the first and last entries and some random ones
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = (i < 1000) ? 14'(i) : (i < 1100) ? 14'(DEPTH - 1 - (i - 1000)) : 14'($urandom);
      wdata = {8'($urandom), 32'($urandom)};
      ref_mem[waddr] = wdata;
      written[waddr] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      a = (i < 1000) ? 14'(i) : 14'($urandom);
      if (!written[a]) continue;
      @(negedge clk) raddr = a;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d read %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
