// ctrk_top - Compressed TDC RTL Kernel (CTRK): an on-chip voltage sensor that
// records long, compressed voltage traces of a shared FPGA, with the port
// monitor used during development.
//
// Data path, one sample every SAMPLE_DIV (5) cycles while a run is active:
//   tdc_delay_line (256-tap carry-chain TDC) -> ctrk_sample_reg ->
//   ctrk_hamming_weight (8-bit weight) -> ctrk_compare_store (keep it if below
//   THRESHOLD, with the Global Time) -> ctrk_trace_ram.
// ctrk_control paces the sampling, runs the Global Time, and decides when
// storing is allowed (free run, hard-wired trigger or auto trigger, the latter
// in ctrk_auto_trigger). ctrk_port_monitor timestamps the first read and write
// on the PCIS, DDR and OCL shell ports. The host reaches everything through the
// AXI4-Lite registers of ctrk_axil_regs.
//
// Ports: clk/rst (kernel clock, synchronous active-high reset);
//        vccint_mv (stand-in for the supply voltage seen by the TDC model);
//        ext_trig (hard-wired trigger wire); AXI4-Lite control slave;
//        AW/AR valid/ready of the three watched shell ports (index 0 PCIS,
//        1 DDR, 2 OCL); status outputs for observation.
// Latency from a sample strobe to the RAM write: 3 cycles (sample register
// 1, Hamming weight 2). The stored timestamp is the Global Time at the write,
// which may be one tick later than the sample instant.
module ctrk_top
  import ctrk_pkg::*;
#(
  parameter int unsigned DEPTH      = TRACE_DEPTH,
  parameter int unsigned SAMPLE_PER = SAMPLE_DIV,
  parameter int unsigned TIME_PER   = TIME_DIV
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [15:0]           vccint_mv,
  input  logic                  ext_trig,
  // AXI4-Lite control slave
  input  logic [7:0]            s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [31:0]           s_axil_wdata,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [7:0]            s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [31:0]           s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  // watched shell ports
  input  logic [MON_PORTS-1:0]  mon_awvalid,
  input  logic [MON_PORTS-1:0]  mon_awready,
  input  logic [MON_PORTS-1:0]  mon_arvalid,
  input  logic [MON_PORTS-1:0]  mon_arready,
  // observation
  output ctrk_state_e           state,
  output logic                  sample_strobe,
  output logic                  hw_valid,
  output logic [HW_W-1:0]       hw,
  output logic                  stored,
  output logic                  skipped,
  output logic                  triggered,
  output logic                  drop_start,
  output logic                  full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [TAPS-1:0]     taps, sample;
  logic                sample_valid;
  logic [TIME_W-1:0]   now;
  logic                clear, time_en, store_en;
  logic                start, stop;
  ctrk_mode_e          mode;
  logic [3:0]          trig_drops, drop_count;
  logic [THRESH_W-1:0] threshold;
  logic [HW_W-1:0]     trig_level;
  logic [31:0]         trig_rearm, capture_len;
  logic                we;
  logic [AW-1:0]       waddr, rd_addr;
  trace_entry_t        wdata, rd_entry;
  logic [AW:0]         count;
  logic [TIME_W-1:0]   drop1_time, drop2_time;
  logic [MON_EVENTS-1:0] mon_seen;
  logic [TIME_W-1:0]   mon_time [MON_EVENTS];

  tdc_delay_line #(.CARRY8_COUNT(CARRY8_COUNT)) u_tdc (
    .clk, .vccint_mv, .taps
  );

  ctrk_sample_reg #(.TAPS(TAPS)) u_sample (
    .clk, .rst, .sample_en(sample_strobe), .taps_in(taps),
    .sample, .sample_valid
  );

  ctrk_hamming_weight #(.TAPS(TAPS), .OUT_W(HW_W)) u_hw (
    .clk, .rst, .in_valid(sample_valid), .sample_in(sample),
    .out_valid(hw_valid), .hw
  );

  ctrk_global_time #(.WIDTH(TIME_W), .DIV(TIME_PER)) u_time (
    .clk, .rst, .clear, .en(time_en), .time_o(now), .tick()
  );

  ctrk_compare_store #(.DEPTH(DEPTH)) u_cmp (
    .clk, .rst, .clear, .store_en, .in_valid(hw_valid), .hw,
    .timestamp(now), .threshold, .we, .waddr, .wdata, .count, .full,
    .stored, .skipped
  );

  ctrk_trace_ram #(.DEPTH(DEPTH), .WIDTH(ENTRY_W)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr(rd_addr), .rdata(rd_entry)
  );

  ctrk_control #(.SAMPLE_PERIOD(SAMPLE_PER)) u_ctrl (
    .clk, .rst, .start, .stop, .mode, .ext_trig, .full, .capture_len,
    .hw_valid, .hw, .timestamp(now), .trig_level, .trig_rearm, .trig_drops,
    .state, .clear, .sample_en(sample_strobe), .time_en, .store_en,
    .triggered, .drop_start, .drop_count,
    .first_drop_time(drop1_time), .last_drop_time(drop2_time)
  );

  ctrk_port_monitor u_mon (
    .clk, .rst, .clear, .en(time_en), .timestamp(now),
    .awvalid(mon_awvalid), .awready(mon_awready),
    .arvalid(mon_arvalid), .arready(mon_arready),
    .seen(mon_seen), .first_time(mon_time)
  );

  ctrk_axil_regs #(.DEPTH(DEPTH)) u_regs (
    .clk, .rst,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wvalid(s_axil_wvalid), .s_wready(s_axil_wready),
    .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid), .s_bready(s_axil_bready),
    .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid), .s_arready(s_axil_arready),
    .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp), .s_rvalid(s_axil_rvalid),
    .s_rready(s_axil_rready),
    .start, .stop, .mode, .trig_drops, .threshold, .trig_level, .trig_rearm,
    .capture_len, .rd_addr,
    .state, .full, .drop_count, .count, .rd_entry,
    .drop1_time, .drop2_time, .mon_seen, .mon_time
  );
endmodule
