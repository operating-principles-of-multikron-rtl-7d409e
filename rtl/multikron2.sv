// multikron2: top level of the MultiKron II performance instrumentation
// chip, one per node of a multiprocessor.
//
// Software marks an event with a single 64-bit store into the chip's
// address block. The store becomes a 20-byte Trace sample (header, 56-bit
// timestamp, the writing processor's Source Address register, 64 bits of
// user data), optionally extended by the 16 resource counters to an 84-byte
// Resource sample. Samples queue in the on-chip FIFO (counter values in the
// shadow registers) and leave byte-serially on the collection network port,
// off the computer's own data paths. The resource counters count clocks,
// external pins or software increments, and can be read and written for
// per-process ("virtual") use.
//
// Clocks: everything runs on node_clk; ts_clk (at most one third of
// node_clk) is synchronized in; netclk is generated at node_clk / 2.
// Reset: resetb is asynchronous, active low, and must be held at least five
// node clocks; it is the only thing that clears the timestamp.
// Pads: the 64-bit bidirectional data bus is split into d_in, d_out and
// d_oe; outdisb (low) removes every output enable, reported on out_en for
// the pad ring. The internal test outputs T0..T7 are not provided.
module multikron2
  import mk2_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                node_clk,
  input  logic                ts_clk,
  input  logic                resetb,
  input  logic                testb,
  input  logic                outdisb,
  output logic                out_en,
  // processor bus
  input  logic                readb,
  input  logic                writeb,
  input  logic                startb,
  input  logic                holdb,
  input  logic                waitstate,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [DATA_W-1:0]   d_in,
  output logic [DATA_W-1:0]   d_out,
  output logic                d_oe,
  output logic                ackb,
  input  logic [NUM_CPU-1:0]  cpu_id_lines,
  // resource counter inputs
  input  logic [NUM_RC-1:0]   x_pins,
  // collection network
  output logic                netclk,
  output logic [7:0]          n_data,
  output logic                odd_parity,
  output logic                eom,
  output logic                fifodab,
  input  logic                netrdy
);
  logic clk, rst_n, test_mode;
  assign clk       = node_clk;
  assign rst_n     = resetb;
  assign test_mode = !testb;
  assign out_en    = outdisb;

  // processor interface <-> controller
  logic              core_req, core_we, core_done;
  logic [ADDR_W-1:0] core_addr;
  logic [DATA_W-1:0] core_wdata, core_rdata;
  logic              sw_rst, mode32, wait_state;
  logic              d_oe_int;

  // clocks and timestamp
  logic            ts_tick, div10_tick, div100_tick;
  logic [TS_W-1:0] ts;
  logic            ts_load, ts_inc;

  // resource counters
  logic                        wr_enable, wr_mode, wr_clksel;
  logic [NUM_RC-1:0]           rc_enabled, rc_clr;
  logic [NUM_RC-1:0][3:0]      rc_mode, rc_clksel;
  logic [DATA_W-1:0]           enable_rd;
  logic [NUM_RC-1:0][RC_W-1:0] cnt, shadow;
  logic                        cnt_wr, cnt_inc;
  logic [3:0]                  cnt_idx;
  logic                        shd_copy, shd_mark, shd_free, shd_busy;
  logic                        net_free;

  // source registers
  logic [NUM_CPU-1:0][SRC_W-1:0] src_regs;
  logic [2:0]                    cpu_id;
  logic [SRC_W-1:0]              sel_src;
  logic                          src_wr;

  // FIFO and network
  fifo_entry_t fifo_din, fifo_head;
  logic        fifo_push, fifo_pop_test, fifo_pop_net, fifo_empty, fifo_full;
  logic        net_en, net_stall, net_abort;

  mk2_proc_if u_proc_if (
    .clk, .rst_n, .sw_rst,
    .readb, .writeb, .startb, .holdb,
    .ws_pin (waitstate),
    .addr, .d_in, .d_out,
    .d_oe   (d_oe_int),
    .ackb,
    .mode32, .wait_state,
    .core_req, .core_we, .core_addr, .core_wdata, .core_done, .core_rdata
  );
  assign d_oe = d_oe_int && outdisb;

  mk2_clk_enables u_clk_en (
    .clk, .rst_n, .ts_clk, .ts_tick, .div10_tick, .div100_tick
  );

  mk2_timestamp u_ts (
    .clk, .rst_n, .ts_tick, .test_mode,
    .load (ts_load), .load_val (core_wdata[TS_W-1:0]), .inc (ts_inc), .ts
  );

  mk2_rc_ctrl_regs u_rc_ctrl (
    .clk, .rst_n, .sw_rst,
    .wr_enable, .wr_mode, .wr_clksel,
    .wdata   (core_wdata),
    .enabled (rc_enabled), .clr (rc_clr),
    .mode    (rc_mode), .clksel (rc_clksel),
    .enable_rd
  );

  mk2_resource_counters u_rc (
    .clk, .rst_n, .sw_rst, .test_mode,
    .enabled (rc_enabled), .clr (rc_clr),
    .mode (rc_mode), .clksel (rc_clksel),
    .x_pins, .div10_tick, .div100_tick, .ts_tick,
    .wr (cnt_wr), .inc (cnt_inc), .idx (cnt_idx),
    .wdata (core_wdata[RC_W-1:0]),
    .cnt
  );

  mk2_shadow_regs u_shadow (
    .clk, .rst_n, .sw_rst,
    .copy (shd_copy), .mark_busy (shd_mark),
    .free (shd_free || net_free),
    .cnt, .shadow, .busy (shd_busy)
  );

  mk2_source_regs u_src (
    .clk, .rst_n, .sw_rst,
    .wr (src_wr), .widx (core_addr[2:0]), .wdata (core_wdata[SRC_W-1:0]),
    .cpu_lines (cpu_id_lines),
    .regs (src_regs), .cpu_id, .sel_src
  );

  mk2_sample_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .sw_rst,
    .push (fifo_push), .din (fifo_din),
    .pop  (fifo_pop_test || fifo_pop_net),
    .head (fifo_head), .empty (fifo_empty), .full (fifo_full)
  );

  mk2_net_out u_net (
    .clk, .rst_n, .sw_rst,
    .net_en, .netrdy,
    .stall (net_stall), .restart (net_abort),
    .head (fifo_head), .empty (fifo_empty),
    .shadow,
    .pop (fifo_pop_net), .free_shadow (net_free),
    .netclk, .n_data, .parity (odd_parity), .eom, .fifodab
  );

  mk2_controller u_ctrl (
    .clk, .rst_n, .test_mode, .wait_state,
    .req (core_req), .we (core_we), .addr (core_addr), .wdata (core_wdata),
    .done (core_done), .rdata (core_rdata),
    .sw_rst, .mode32,
    .ts, .ts_load, .ts_inc,
    .wr_enable, .wr_mode, .wr_clksel, .enable_rd,
    .mode (rc_mode), .clksel (rc_clksel),
    .cnt, .shadow, .shd_busy,
    .cnt_wr, .cnt_inc, .cnt_idx, .shd_copy, .shd_mark, .shd_free,
    .src_regs, .cpu_id, .sel_src, .src_wr,
    .fifo_full, .fifo_empty, .fifo_head, .fifo_push, .fifo_din,
    .fifo_pop (fifo_pop_test),
    .net_en, .net_stall, .net_abort
  );
endmodule
