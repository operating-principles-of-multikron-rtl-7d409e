// mk2_pkg: constants and types shared by the MultiKron II modules.
//
// The MultiKron II is a memory-mapped performance instrumentation chip: a
// processor write to one of its addresses triggers a time-stamped Trace
// sample (or a Resource sample carrying all 16 resource counters) which is
// queued on chip and shipped byte-serially to a separate collection network.
// This package holds the 7-bit address map, the CSR bit positions, the
// sample layout and the 4-bit field encodings of the resource counter
// control registers. All numbers follow the published address map and
// register formats; the FIFO depth is this design's own choice.
package mk2_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W      = 64;   // processor data bus
  localparam int unsigned ADDR_W      = 7;    // MultiKron address field
  localparam int unsigned TS_W        = 56;   // timestamp counter
  localparam int unsigned NUM_RC      = 16;   // resource counters
  localparam int unsigned RC_W        = 32;   // one resource counter
  localparam int unsigned NUM_CPU     = 8;    // CPU ID lines / source regs
  localparam int unsigned SRC_W       = 32;   // source address register
  localparam int unsigned SAMPLE_W    = 160;  // trace sample (20 bytes)
  localparam int unsigned FIFO_W      = SAMPLE_W + 1; // + "resource" bit
  localparam int unsigned TRACE_BYTES = SAMPLE_W / 8;                  // 20
  localparam int unsigned RES_BYTES   = TRACE_BYTES + NUM_RC * RC_W / 8; // 84

  // ------------------------------------------------------------ addresses
  localparam logic [6:0] A_SWRESET  = 7'd0;
  localparam logic [6:0] A_CSR      = 7'd1;
  localparam logic [6:0] A_TS       = 7'd2;
  localparam logic [6:0] A_FILTER   = 7'd4;
  localparam logic [6:0] A_WAITCNT  = 7'd5;
  localparam logic [6:0] A_OVRCNT   = 7'd6;
  localparam logic [6:0] A_HIGH32   = 7'd7;
  localparam logic [6:0] A_ENABLE   = 7'd8;
  localparam logic [6:0] A_MODE     = 7'd10;
  localparam logic [6:0] A_CLKSEL   = 7'd12;
  localparam logic [6:0] A_INC_TS   = 7'd16;  // test mode only
  localparam logic [6:0] A_INC_WAIT = 7'd17;  // test mode only
  localparam logic [6:0] A_INC_OVR  = 7'd18;  // test mode only
  localparam logic [6:0] A_NET_DIS  = 7'd19;  // test mode only
  localparam logic [6:0] A_NET_EN   = 7'd20;  // test mode only
  localparam logic [6:0] A_ADVANCE  = 7'd21;  // test mode only
  localparam logic [6:0] A_FIFO_A   = 7'd25;  // 25..29: FIFO groups A..E
  localparam logic [6:0] A_FIFO_E   = 7'd29;
  // 32..39 source address regs, 64..79 counter write / read-with-copy,
  // 80..95 counter increment / read-without-copy, 96..111 trace sample,
  // 112..127 resource sample.

  // ------------------------------------------------------------ CSR bits
  localparam int unsigned CSR_SAMP_EN   = 0;
  localparam int unsigned CSR_SAMP_DIS  = 1;
  localparam int unsigned CSR_WWAIT_EN  = 2;
  localparam int unsigned CSR_WWAIT_DIS = 3;
  localparam int unsigned CSR_RWAIT_EN  = 4;
  localparam int unsigned CSR_RWAIT_DIS = 5;
  localparam int unsigned CSR_FIFO_FULL = 6;
  localparam int unsigned CSR_SHD_FULL  = 7;
  localparam int unsigned CSR_FIFO_OVR  = 8;
  localparam int unsigned CSR_SHD_OVR   = 9;
  localparam int unsigned CSR_BIT161    = 10;
  localparam int unsigned CSR_WSTATES   = 12;
  localparam int unsigned CSR_M32_EN    = 14;
  localparam int unsigned CSR_M32_DIS   = 15;

  // ---------------------------------------------------- sample header
  // header = {cpu_id[2:0], type[1:0], shadow_ovr, fifo_ovr, 1'b0}
  localparam logic [1:0] TYPE_TRACE    = 2'b11;
  localparam logic [1:0] TYPE_RESOURCE = 2'b10;

  // ------------------------------------- resource counter control fields
  // Mode register, bits [2:0] of a field (bit 3 = double precision).
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,  // x000
    SRC_CLK  = 2'd1,  // x001 / x101: internal clock
    SRC_SW   = 2'd2,  // x010 / x110: software increment
    SRC_XEN  = 2'd3   // x011 / x111: internal clock gated by external pin
  } rc_src_e;
  localparam logic [3:0] MODE_DEFAULT   = 4'b0100; // external signal edges
  localparam logic [3:0] CLKSEL_DEFAULT = 4'b0100; // timestamp clock
  // Enable register field codes (low two bits)
  localparam logic [1:0] EN_NOP    = 2'b00;
  localparam logic [1:0] EN_DIS    = 2'b01;
  localparam logic [1:0] EN_EN     = 2'b10;
  localparam logic [1:0] EN_RST_EN = 2'b11;

  // One FIFO entry: the 160-bit trace sample plus a flag that says the
  // entry is the head of a Resource sample (the counters follow it from
  // the shadow registers).
  typedef struct packed {
    logic                resource;
    logic [SAMPLE_W-1:0] sample;
  } fifo_entry_t;

endpackage
