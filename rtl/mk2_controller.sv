// mk2_controller: address decoder and sampling control of the MultiKron II.
//
// Receives one processor request at a time from mk2_proc_if (core_req with
// the 7-bit address, direction and 64-bit write data) and either carries it
// out in that cycle (done) or holds done low to make the processor wait.
// It contains the CSR, the Filter register, the Wait and Overrun Error
// Counters and the sample assembler, and drives the strobes of the other
// blocks. Read data is returned in the same cycle; unused bit positions
// read as 1.
//
// Sample writes (addresses 96..127; 112..127 are Resource samples) are
// dropped silently when sampling is disabled or the Filter bit selected by
// the low four address bits is 0. Otherwise a sample needs a free FIFO
// entry, and a Resource sample also needs free shadow registers. If what it
// needs is busy and the CSR's "wait on overrun" option is set, the
// acknowledge is held back and the Wait Error Counter counts each held
// Node clock until the resource frees up; without the option the sample is
// discarded, the Overrun Error Counter counts it and the overrun flag(s)
// go into the next sample's header.
//
// Read-with-copy of a counter (64..79) copies all counters to the shadow
// registers and returns counter j. While a Resource sample holds the shadow
// registers it either waits (CSR read-wait option, counted as wait cycles)
// or returns the held shadow value without copying. Read-without-copy
// (80..95) returns the shadow value and, when the shadow registers are
// busy, stalls the network for two Node clocks because both share one bus.
//
// Test mode (TESTB low) enables: timestamp write/increment, error counter
// load/increment, network disable/enable, FIFO advance (which also frees
// the shadow registers) and direct FIFO writes (25..29, the 32 written bits
// copied into all five 32-bit groups). Outside test mode those writes do
// nothing, and a write to an error counter clears it.
// Design choices: the Filter register resets to 0, the network resets
// enabled, a direct FIFO write is dropped when the FIFO is full, reads of
// write-only or unused addresses return all ones.
module mk2_controller
  import mk2_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         test_mode,
  input  logic                         wait_state,
  // request from the processor interface
  input  logic                         req,
  input  logic                         we,
  input  logic [ADDR_W-1:0]            addr,
  input  logic [DATA_W-1:0]            wdata,
  output logic                         done,
  output logic [DATA_W-1:0]            rdata,
  // chip-wide
  output logic                         sw_rst,
  output logic                         mode32,
  // timestamp
  input  logic [TS_W-1:0]              ts,
  output logic                         ts_load,
  output logic                         ts_inc,
  // resource counter control registers
  output logic                         wr_enable,
  output logic                         wr_mode,
  output logic                         wr_clksel,
  input  logic [DATA_W-1:0]            enable_rd,
  input  logic [NUM_RC-1:0][3:0]       mode,
  input  logic [NUM_RC-1:0][3:0]       clksel,
  // resource counters and shadow registers
  input  logic [NUM_RC-1:0][RC_W-1:0]  cnt,
  input  logic [NUM_RC-1:0][RC_W-1:0]  shadow,
  input  logic                         shd_busy,
  output logic                         cnt_wr,
  output logic                         cnt_inc,
  output logic [3:0]                   cnt_idx,
  output logic                         shd_copy,
  output logic                         shd_mark,
  output logic                         shd_free,
  // source address registers
  input  logic [NUM_CPU-1:0][SRC_W-1:0] src_regs,
  input  logic [2:0]                   cpu_id,
  input  logic [SRC_W-1:0]             sel_src,
  output logic                         src_wr,
  // sample FIFO
  input  logic                         fifo_full,
  input  logic                         fifo_empty,
  input  fifo_entry_t                  fifo_head,
  output logic                         fifo_push,
  output fifo_entry_t                  fifo_din,
  output logic                         fifo_pop,
  // network
  output logic                         net_en,
  output logic                         net_stall,
  output logic                         net_abort
);
  localparam logic [DATA_W-1:0] ONES = '1;

  logic [15:0] filter;
  logic        samp_en, wwait_en, rwait_en;
  logic [15:0] csr_rd;
  logic        fifo_ovr, shadow_ovr;
  logic [31:0] wait_cnt, ovr_cnt;

  // ---------------------------------------------------------- decode
  wire wr = req && we;
  wire rd = req && !we;
  wire a_sample   = addr[6:5] == 2'b11;
  wire a_resource = addr[6:4] == 3'b111;
  wire a_cnt_copy = addr[6:4] == 3'b100;    // 64..79
  wire a_cnt_inc  = addr[6:4] == 3'b101;    // 80..95
  wire a_src      = addr[6:3] == 4'b0100;   // 32..39
  wire a_fifo     = addr >= A_FIFO_A && addr <= A_FIFO_E;

  // ------------------------------------------------------ sampling
  wire triggered  = wr && a_sample && samp_en && filter[addr[3:0]];
  wire need_shd   = a_resource;
  wire fifo_ok    = !fifo_full;
  wire shd_ok     = !need_shd || !shd_busy;
  wire take       = triggered && fifo_ok && shd_ok;
  wire samp_block = triggered && !(fifo_ok && shd_ok);
  wire samp_wait  = samp_block && wwait_en;
  wire samp_drop  = samp_block && !wwait_en;

  // -------------------------------------------- counter read with copy
  wire copy_rd    = rd && a_cnt_copy;
  wire copy_wait  = copy_rd && shd_busy && rwait_en;

  wire waiting    = samp_wait || copy_wait;
  assign done     = req && !waiting;
  wire commit     = done;               // request carried out this cycle

  // ------------------------------------------------------- strobes
  assign sw_rst    = commit && we && addr == A_SWRESET;
  assign ts_load   = commit && we && addr == A_TS && test_mode;
  assign ts_inc    = commit && we && addr == A_INC_TS && test_mode;
  assign wr_enable = commit && we && addr == A_ENABLE;
  assign wr_mode   = commit && we && addr == A_MODE;
  assign wr_clksel = commit && we && addr == A_CLKSEL;
  assign cnt_idx   = addr[3:0];
  assign cnt_wr    = commit && we && a_cnt_copy;
  assign cnt_inc   = commit && we && a_cnt_inc;
  assign src_wr    = commit && we && a_src;
  assign shd_copy  = (commit && take && a_resource) || (commit && copy_rd && !shd_busy);
  assign shd_mark  = commit && take && a_resource;
  assign shd_free  = commit && we && addr == A_ADVANCE && test_mode;
  assign fifo_pop  = shd_free && !fifo_empty;
  assign net_abort = shd_free;
  assign net_stall = commit && rd && a_cnt_inc && shd_busy;

  wire fifo_test_wr = commit && we && a_fifo && test_mode && !fifo_full;
  fifo_entry_t smp;
  assign fifo_push = (commit && take) || fifo_test_wr;
  assign fifo_din  = fifo_test_wr ? fifo_entry_t'({1'b0, {5{wdata[31:0]}}}) : smp;

  // ----------------------------------------------- local registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filter <= '0;
      net_en <= 1'b1;
    end else if (sw_rst) begin
      filter <= '0;
      net_en <= 1'b1;
    end else if (commit && we) begin
      if (addr == A_FILTER)                filter <= wdata[15:0];
      if (addr == A_NET_DIS && test_mode)  net_en <= 1'b0;
      if (addr == A_NET_EN  && test_mode)  net_en <= 1'b1;
    end
  end

  mk2_csr u_csr (
    .clk, .rst_n, .sw_rst,
    .wr          (commit && we && addr == A_CSR),
    .wdata       (wdata[15:0]),
    .fifo_full,
    .shadow_full (shd_busy),
    .fifo_ovr, .shadow_ovr,
    .bit161      (!fifo_empty && fifo_head.resource),
    .wait_state,
    .samp_en, .wwait_en, .rwait_en, .mode32,
    .rd          (csr_rd)
  );

  mk2_error_counter u_wait_cnt (
    .clk, .rst_n, .sw_rst,
    .count    (waiting),
    .clear    (commit && we && addr == A_WAITCNT && !test_mode),
    .load     (commit && we && addr == A_WAITCNT && test_mode),
    .load_val (wdata[31:0]),
    .test_inc (commit && we && addr == A_INC_WAIT && test_mode),
    .value    (wait_cnt)
  );

  mk2_error_counter u_ovr_cnt (
    .clk, .rst_n, .sw_rst,
    .count    (commit && samp_drop),
    .clear    (commit && we && addr == A_OVRCNT && !test_mode),
    .load     (commit && we && addr == A_OVRCNT && test_mode),
    .load_val (wdata[31:0]),
    .test_inc (commit && we && addr == A_INC_OVR && test_mode),
    .value    (ovr_cnt)
  );

  mk2_sample_assembler u_asm (
    .clk, .rst_n, .sw_rst,
    .take        (commit && take),
    .resource    (a_resource),
    .lost_fifo   (commit && samp_drop && !fifo_ok),
    .lost_shadow (commit && samp_drop && !shd_ok),
    .cpu_id,
    .ts,
    .src         (sel_src),
    .user        (wdata),
    .entry       (smp),
    .fifo_ovr, .shadow_ovr
  );

  // ----------------------------------------------------- read mux
  always_comb begin
    rdata = ONES;
    if (a_cnt_copy)
      rdata = {ONES[63:32], shd_busy ? shadow[addr[3:0]] : cnt[addr[3:0]]};
    else if (a_cnt_inc)
      rdata = {ONES[63:32], shadow[addr[3:0]]};
    else if (a_src)
      rdata = {ONES[63:32], src_regs[addr[2:0]]};
    else if (a_fifo)
      rdata = {ONES[63:32], fifo_head.sample[32*(4 - (addr - A_FIFO_A)) +: 32]};
    else begin
      unique case (addr)
        A_CSR:     rdata = {ONES[63:16], csr_rd};
        A_TS:      rdata = {ONES[63:56], ts};
        A_FILTER:  rdata = {ONES[63:16], filter};
        A_WAITCNT: rdata = {ONES[63:32], wait_cnt};
        A_OVRCNT:  rdata = {ONES[63:32], ovr_cnt};
        A_ENABLE:  rdata = enable_rd;
        A_MODE:    rdata = mode;
        A_CLKSEL:  rdata = clksel;
        default:   rdata = ONES;
      endcase
    end
  end
endmodule
