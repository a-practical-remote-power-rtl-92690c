// ctrk_port_monitor - development aid that records when the shell ports of
// the custom logic carry their first write and first read transaction.
//
// Three AXI ports between shell and custom logic are watched: PCIS (host
// writes into the FPGA), DDR (the on-board DRAM) and OCL (the OpenCL runtime's
// register port). For each port a write starts with an AW-channel handshake
// (awvalid && awready) and a read with an AR-channel handshake. The first
// such handshake after clear stores the Global Time in that event's slot and
// sets its valid bit; later handshakes are ignored. Placing these times next
// to the compressed trace shows which voltage drop belongs to which port
// activity. It is a measurement aid: an attacker has no access to these ports.
//
// Event index: 2*port + 0 = write, 2*port + 1 = read; port 0 PCIS, 1 DDR,
// 2 OCL. Watching AW/AR handshakes is this design's reading of "first
// transaction"; the three ports and the write/read split follow the
// published setup.
//
// Timing: a handshake in cycle t is recorded at the edge ending cycle t.
module ctrk_port_monitor
  import ctrk_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   en,
  input  logic [TIME_W-1:0]      timestamp,
  input  logic [MON_PORTS-1:0]   awvalid,
  input  logic [MON_PORTS-1:0]   awready,
  input  logic [MON_PORTS-1:0]   arvalid,
  input  logic [MON_PORTS-1:0]   arready,
  output logic [MON_EVENTS-1:0]  seen,
  output logic [TIME_W-1:0]      first_time [MON_EVENTS]
);
  logic [MON_EVENTS-1:0] fire;

  always_comb begin
    for (int p = 0; p < MON_PORTS; p++) begin
      fire[2*p]     = awvalid[p] && awready[p];
      fire[2*p + 1] = arvalid[p] && arready[p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      seen <= '0;
      for (int e = 0; e < MON_EVENTS; e++) first_time[e] <= '0;
    end else if (en) begin
      for (int e = 0; e < MON_EVENTS; e++) begin
        if (fire[e] && !seen[e]) begin
          seen[e]       <= 1'b1;
          first_time[e] <= timestamp;
        end
      end
    end
  end
endmodule
