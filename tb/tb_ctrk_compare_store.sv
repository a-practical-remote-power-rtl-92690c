// tb_ctrk_compare_store - drives weights and timestamps into the compare-and-
// store unit and checks, against a reference model, which samples are written,
// where, with what content, and that writing stops when the RAM is full.
// Uses a 64-entry RAM so that the full condition is reached quickly.
module tb_ctrk_compare_store;
  import ctrk_pkg::*;
  localparam int DEPTH = 64;
  logic              clk = 1'b0, rst, clear, store_en, in_valid;
  logic [7:0]        hw;
  logic [31:0]       timestamp, threshold;
  logic              we, full, stored, skipped;
  logic [5:0]        waddr;
  trace_entry_t      wdata;
  logic [6:0]        count;
  int checks = 0, failures = 0;
  int ref_count, n_full_block;

  ctrk_compare_store #(.DEPTH(DEPTH)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int thr);
    for (int i = 0; i < n; i++) begin
      bit exp_we;
      @(negedge clk);
      in_valid  = ($urandom_range(0, 1) == 1);
      store_en  = ($urandom_range(0, 7) != 0);
      hw        = 8'($urandom);
      timestamp = $urandom;
      threshold = thr;
      #1;
      exp_we = in_valid && store_en && (ref_count < DEPTH) && (int'(hw) < thr);
      if (in_valid && store_en && ref_count >= DEPTH) n_full_block++;
      checks++;
      if (we !== exp_we || (exp_we && (waddr !== 6'(ref_count) ||
          wdata.hw !== hw || wdata.timestamp !== timestamp)) ||
          skipped !== (in_valid && store_en && ref_count < DEPTH && int'(hw) >= thr)) begin
        failures++;
        $display("FAIL we=%0b exp=%0b addr=%0d ref=%0d hw=%0d thr=%0d", we, exp_we, waddr, ref_count, hw, thr);
      end
      @(posedge clk);
      if (exp_we) ref_count++;
      #1;
      checks++;
      if (count !== 7'(ref_count) || full !== (ref_count == DEPTH)) begin
        failures++;
        $display("FAIL count=%0d ref=%0d full=%0b", count, ref_count, full);
      end
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; store_en = 1'b0; in_valid = 1'b0;
    hw = '0; timestamp = '0; threshold = 32'd256;
    ref_count = 0; n_full_block = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(200, 100);          // compressed: only weights below 100
    @(negedge clk) clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    ref_count = 0;
    checks++;
    if (count !== 0 || full) begin failures++; $display("FAIL clear"); end
    run(300, 256);          // threshold 256: every sample kept, RAM fills
    checks++;
    if (!full || n_full_block == 0) begin
      failures++;
      $display("FAIL full never blocked a write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
