// ctrk_axil_regs - AXI4-Lite control port of the kernel: the registers the
// host uses to set the threshold, choose the mode, start and stop a run, and
// read the trace and the measured times back.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CTRL        W: bit0 start (pulse), bit1 stop (pulse);
//                    RW: bits3:2 mode (0 free run, 1 hard trigger, 2 auto
//                    trigger), bits7:4 drops that fire the auto trigger
//   0x04 STATUS      R: bits1:0 state (0 idle,1 armed,2 capture,3 done),
//                    bit2 RAM full, bits6:3 drops seen
//   0x08 THRESHOLD   RW: store samples whose weight is below this (reset 256)
//   0x0C TRIG_LEVEL  RW: bits7:0 auto trigger drop level
//   0x10 TRIG_REARM  RW: samples back above the level that end a drop
//   0x14 CAPTURE_LEN RW: trigger window T2 in cycles, 0 = unlimited
//   0x18 COUNT       R: trace entries written
//   0x1C RD_ADDR     RW: trace entry to read
//   0x20 RD_HW       R: weight of that entry
//   0x24 RD_TIME     R: timestamp of that entry
//   0x28 DROP1_TIME  R: time the first drop began
//   0x2C DROP2_TIME  R: time the latest drop began
//   0x30 MON_VALID   R: bits5:0 port monitor valid bits
//   0x40..0x54       R: port monitor first-transaction times
//
// The published kernel only states that it has the standard AXI4 control
// port of its tool flow and a 32-bit threshold input; the register map, the
// reset values and the readout of the trace through registers are this
// design's own. One transaction at a time: a write is accepted when address
// and data are both valid, a read returns data one cycle after the address.
// RD_HW/RD_TIME show the entry at RD_ADDR from the second cycle after
// RD_ADDR was written (RAM read latency). Writes to read-only addresses are
// ignored; reads of unmapped addresses return 0. Responses are always OKAY.
module ctrk_axil_regs
  import ctrk_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic                     clk,
  input  logic                     rst,
  // AXI4-Lite slave
  input  logic [7:0]               s_awaddr,
  input  logic                     s_awvalid,
  output logic                     s_awready,
  input  logic [31:0]              s_wdata,
  input  logic                     s_wvalid,
  output logic                     s_wready,
  output logic [1:0]               s_bresp,
  output logic                     s_bvalid,
  input  logic                     s_bready,
  input  logic [7:0]               s_araddr,
  input  logic                     s_arvalid,
  output logic                     s_arready,
  output logic [31:0]              s_rdata,
  output logic [1:0]               s_rresp,
  output logic                     s_rvalid,
  input  logic                     s_rready,
  // kernel settings
  output logic                     start,
  output logic                     stop,
  output ctrk_mode_e               mode,
  output logic [3:0]               trig_drops,
  output logic [THRESH_W-1:0]      threshold,
  output logic [HW_W-1:0]          trig_level,
  output logic [31:0]              trig_rearm,
  output logic [31:0]              capture_len,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  // kernel status
  input  ctrk_state_e              state,
  input  logic                     full,
  input  logic [3:0]               drop_count,
  input  logic [$clog2(DEPTH):0]   count,
  input  trace_entry_t             rd_entry,
  input  logic [TIME_W-1:0]        drop1_time,
  input  logic [TIME_W-1:0]        drop2_time,
  input  logic [MON_EVENTS-1:0]    mon_seen,
  input  logic [TIME_W-1:0]        mon_time [MON_EVENTS]
);
  logic wr_go, rd_go;
  logic [31:0] rd_val;
  logic [$clog2(MON_EVENTS)-1:0] mon_idx;

  // Word index of a port monitor time, taken from the read address.
  assign mon_idx = $clog2(MON_EVENTS)'((s_araddr - REG_MON_BASE) >> 2);

  assign s_awready = wr_go;
  assign s_wready  = wr_go;
  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_arready = !s_rvalid;
  assign rd_go     = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  // Register writes.
  always_ff @(posedge clk) begin
    if (rst) begin
      start       <= 1'b0;
      stop        <= 1'b0;
      mode        <= MODE_FREE_RUN;
      trig_drops  <= 4'd2;
      threshold   <= THRESH_W'(256);
      trig_level  <= '0;
      trig_rearm  <= 32'd64;
      capture_len <= '0;
      rd_addr     <= '0;
      s_bvalid    <= 1'b0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr)
          REG_CTRL: begin
            start      <= s_wdata[0];
            stop       <= s_wdata[1];
            mode       <= ctrk_mode_e'(s_wdata[3:2]);
            trig_drops <= s_wdata[7:4];
          end
          REG_THRESHOLD:   threshold   <= s_wdata;
          REG_TRIG_LEVEL:  trig_level  <= s_wdata[HW_W-1:0];
          REG_TRIG_REARM:  trig_rearm  <= s_wdata;
          REG_CAPTURE_LEN: capture_len <= s_wdata;
          REG_RD_ADDR:     rd_addr     <= s_wdata[$clog2(DEPTH)-1:0];
          default: ;
        endcase
      end
    end
  end

  // Read multiplexer.
  always_comb begin
    rd_val = '0;
    if (s_araddr >= REG_MON_BASE && s_araddr < REG_MON_BASE + 8'(4 * MON_EVENTS))
      rd_val = mon_time[mon_idx];
    else
      unique case (s_araddr)
        REG_CTRL:        rd_val = {24'd0, trig_drops, mode, 2'b00};
        REG_STATUS:      rd_val = {25'd0, drop_count, full, state};
        REG_THRESHOLD:   rd_val = threshold;
        REG_TRIG_LEVEL:  rd_val = {24'd0, trig_level};
        REG_TRIG_REARM:  rd_val = trig_rearm;
        REG_CAPTURE_LEN: rd_val = capture_len;
        REG_COUNT:       rd_val = 32'(count);
        REG_RD_ADDR:     rd_val = 32'(rd_addr);
        REG_RD_HW:       rd_val = {24'd0, rd_entry.hw};
        REG_RD_TIME:     rd_val = rd_entry.timestamp;
        REG_DROP1_TIME:  rd_val = drop1_time;
        REG_DROP2_TIME:  rd_val = drop2_time;
        REG_MON_VALID:   rd_val = 32'(mon_seen);
        default:         rd_val = '0;
      endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_go) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_val;
      end
    end
  end

  // A response, once offered, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
