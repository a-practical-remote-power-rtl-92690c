// ctrk_pkg - shared types and constants of the Compressed TDC RTL Kernel (CTRK).
//
// The CTRK is a voltage sensor built from a carry-chain time-to-digital
// converter (TDC). Every few clock cycles it takes the Hamming weight of the
// 256-bit TDC sample, and it keeps in block RAM only those samples whose weight
// is below a threshold, each with a 32-bit timestamp. The widths of the TDC
// (32 CARRY8 elements, 256 taps), of the stored sample (8 bits), of the
// timestamp and threshold (32 bits), the sampling period (5 cycles) and the
// timestamp period (10 cycles) follow the published description. The trigger
// modes encoding, the trace entry layout and the register map are this
// design's own choices.
package ctrk_pkg;

  // TDC geometry: 32 CARRY8 elements of 8 taps each.
  localparam int unsigned CARRY8_COUNT = 32;
  localparam int unsigned TAPS         = CARRY8_COUNT * 8;   // 256
  localparam int unsigned HW_W         = 8;                  // stored Hamming weight
  localparam int unsigned TIME_W       = 32;                 // Global Time width
  localparam int unsigned THRESH_W     = 32;                 // threshold port width
  localparam int unsigned SAMPLE_DIV   = 5;                  // cycles per TDC sample
  localparam int unsigned TIME_DIV     = 10;                 // cycles per timestamp tick
  localparam int unsigned TRACE_DEPTH  = 16384;              // trace RAM entries

  // Capture modes selected by the host.
  typedef enum logic [1:0] {
    MODE_FREE_RUN = 2'd0,   // store from start until stop or RAM full
    MODE_HARD_TRIG = 2'd1,  // store a window opened by an external trigger wire
    MODE_AUTO_TRIG = 2'd2   // store a window opened by the auto trigger
  } ctrk_mode_e;

  // Control FSM states.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_ARMED   = 2'd1,      // sampling, waiting for a trigger
    ST_CAPTURE = 2'd2,      // sampling and storing
    ST_DONE    = 2'd3
  } ctrk_state_e;

  // One entry of the trace RAM: the timestamp above the 8-bit weight.
  typedef struct packed {
    logic [TIME_W-1:0] timestamp;
    logic [HW_W-1:0]   hw;
  } trace_entry_t;

  localparam int unsigned ENTRY_W = $bits(trace_entry_t);   // 40

  // Shell ports watched by the port monitor, and their index in its tables.
  localparam int unsigned MON_PORTS = 3;    // 0: PCIS, 1: DDR, 2: OCL
  localparam int unsigned MON_EVENTS = 2 * MON_PORTS;  // write and read per port

  // AXI4-Lite register addresses (byte offsets).
  localparam logic [7:0] REG_CTRL        = 8'h00;
  localparam logic [7:0] REG_STATUS      = 8'h04;
  localparam logic [7:0] REG_THRESHOLD   = 8'h08;
  localparam logic [7:0] REG_TRIG_LEVEL  = 8'h0C;
  localparam logic [7:0] REG_TRIG_REARM  = 8'h10;
  localparam logic [7:0] REG_CAPTURE_LEN = 8'h14;
  localparam logic [7:0] REG_COUNT       = 8'h18;
  localparam logic [7:0] REG_RD_ADDR     = 8'h1C;
  localparam logic [7:0] REG_RD_HW       = 8'h20;
  localparam logic [7:0] REG_RD_TIME     = 8'h24;
  localparam logic [7:0] REG_DROP1_TIME  = 8'h28;
  localparam logic [7:0] REG_DROP2_TIME  = 8'h2C;
  localparam logic [7:0] REG_MON_VALID   = 8'h30;
  localparam logic [7:0] REG_MON_BASE    = 8'h40;   // 6 words: PCIS wr/rd, DDR wr/rd, OCL wr/rd

endpackage
