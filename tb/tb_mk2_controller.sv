// Testbench for mk2_controller, driven directly on its request port with
// simple stand-ins for the FIFO, counters and shadow registers. It walks
// through the sampling rules (sampling enable, filter, FIFO and shadow
// availability with and without the wait options, overrun counting and
// header flags), counter reads with and without copy, the read map,
// test-mode commands and the software reset.
module tb_mk2_controller;
  import mk2_pkg::*;
  logic clk = 0, rst_n = 0, test_mode = 0, wait_state = 1;
  logic req = 0, we = 0, done;
  logic [6:0] addr = 0;
  logic [63:0] wdata = 0, rdata;
  logic sw_rst, mode32;
  logic [55:0] ts = 56'h11_2233_4455_6677;
  logic ts_load, ts_inc, wr_enable, wr_mode, wr_clksel;
  logic [63:0] enable_rd = 64'h1111_1111_1111_1112;
  logic [15:0][3:0] mode, clksel;
  logic [15:0][31:0] cnt, shadow;
  logic shd_busy = 0;
  logic cnt_wr, cnt_inc, shd_copy, shd_mark, shd_free, src_wr;
  logic [3:0] cnt_idx;
  logic [7:0][31:0] src_regs;
  logic [2:0] cpu_id = 3'd6;
  logic [31:0] sel_src = 32'hABCD_0006;
  logic fifo_full = 0, fifo_empty = 1;
  fifo_entry_t fifo_head, fifo_din;
  logic fifo_push, fifo_pop, net_en, net_stall, net_abort;
  int checks = 0, failures = 0;

  mk2_controller dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobes seen during the last operation
  int n_push, n_copy, n_mark, n_stall, n_swrst, n_tsload, n_pop, n_free;
  fifo_entry_t pushed;
  logic [63:0] rd;
  int wait_cycles, waited;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask
  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) fail($sformatf("%s: got %h exp %h", s, got, exp));
  endtask

  // one request; max_wait cycles before the testbench gives up
  task automatic op(input bit w, input logic [6:0] a, input logic [63:0] d,
                    input int max_wait = 1000);
    n_push = 0; n_copy = 0; n_mark = 0; n_stall = 0; n_swrst = 0; n_tsload = 0;
    n_pop = 0; n_free = 0; wait_cycles = 0;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    forever begin
      #1;
      n_push += fifo_push; n_copy += shd_copy; n_mark += shd_mark;
      n_stall += net_stall; n_swrst += sw_rst; n_tsload += ts_load;
      n_pop += fifo_pop; n_free += shd_free;
      if (fifo_push) pushed = fifo_din;
      if (done) begin
        rd = rdata;
        @(posedge clk);
        break;
      end
      if (wait_cycles == max_wait) break;
      @(posedge clk);
      wait_cycles++;
      @(negedge clk);
    end
    #1 req = 0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      cnt[i] = 32'h1000_0000 + i;
      shadow[i] = 32'h5000_0000 + i;
      mode[i] = 4'(i);
      clksel[i] = 4'(15 - i);
    end
    for (int i = 0; i < 8; i++) src_regs[i] = 32'h7000_0000 + i;
    fifo_head = fifo_entry_t'({1'b1, 32'hAAAA_AAAA, 32'hBBBB_BBBB, 32'hCCCC_CCCC,
                               32'hDDDD_DDDD, 32'hEEEE_EEEE});
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- read map
    op(0, A_CSR, 0);      chk(rd, 64'hFFFF_FFFF_FFFF_9000, "CSR after reset");
    op(0, A_TS, 0);       chk(rd, {8'hFF, ts}, "timestamp");
    op(0, A_MODE, 0);     chk(rd, mode, "mode read");
    op(0, A_CLKSEL, 0);   chk(rd, clksel, "clksel read");
    op(0, A_ENABLE, 0);   chk(rd, enable_rd, "enable read");
    op(0, 7'd35, 0);      chk(rd, 64'hFFFF_FFFF_7000_0003, "source reg 3");
    op(0, 7'd27, 0);      chk(rd, 64'hFFFF_FFFF_CCCC_CCCC, "FIFO group C");
    op(0, 7'd50, 0);      chk(rd, '1, "unused address reads ones");
    op(0, 7'd100, 0);     chk(rd, '1, "sample address reads ones");

    // ---- sampling disabled, then filtered
    op(1, 7'd96, 64'h1);  chk(n_push, 0, "no sample while sampling disabled");
    op(1, A_CSR, 64'h1);
    op(1, 7'd96, 64'h1);  chk(n_push, 0, "filtered out");
    op(1, A_FILTER, 64'h8005);
    op(0, A_FILTER, 0);   chk(rd, 64'hFFFF_FFFF_FFFF_8005, "filter read");
    op(1, 7'd98, 64'h0123_4567_89AB_CDEF);
    chk(n_push, 1, "trace sample taken");
    chk(pushed, {1'b0, 8'hD8, ts, sel_src, 64'h0123_4567_89AB_CDEF}, "trace sample content");
    chk(n_copy, 0, "trace sample does not copy counters");
    op(1, 7'd115, 64'h42); chk(n_push, 0, "filter bit 3 off");
    op(1, 7'd127, 64'h42);
    chk({n_push, n_copy, n_mark}, {32'd1, 32'd1, 32'd1}, "resource sample copies and marks");
    chk(pushed.resource, 1, "161st bit marks resource");
    chk(pushed.sample[159:152], 8'hD0, "resource header");

    // ---- overruns without waiting (Table B3a, wait bit 0)
    fifo_full = 1;
    op(1, 7'd96, 64'h2);  chk(n_push, 0, "FIFO full: discarded");
    chk(wait_cycles, 0, "no wait when discarding");
    fifo_full = 0; shd_busy = 1;
    op(1, 7'd96, 64'h3);  chk(n_push, 1, "trace sample unaffected by busy shadow");
    chk(pushed.sample[159:152], 8'hDA, "FIFO overrun flag, then cleared");
    op(1, 7'd112, 64'h4); chk(n_push, 0, "shadow busy: resource sample discarded");
    op(0, A_OVRCNT, 0);   chk(rd[31:0], 2, "overrun counter");
    op(0, A_CSR, 0);      chk(rd[15:0], 16'h9281, "CSR shows shadow full and overrun");
    shd_busy = 0;
    op(1, 7'd96, 64'h5);  chk(pushed.sample[159:152], 8'hDC, "shadow overrun flag");
    op(1, A_OVRCNT, 0);
    op(0, A_OVRCNT, 0);   chk(rd[31:0], 0, "overrun counter cleared");

    // ---- waiting (wait bit 1)
    op(1, A_CSR, 64'h4);
    fifo_full = 1;
    fork
      op(1, 7'd96, 64'h6);
      begin repeat (7) @(posedge clk); #2 fifo_full = 0; end
    join
    chk(n_push, 1, "sample taken after FIFO frees");
    waited = wait_cycles;
    checks++; if (waited < 6 || waited > 8) fail($sformatf("waited %0d", waited));
    op(0, A_WAITCNT, 0);  chk(rd[31:0], 32'(waited), "wait counter counts held cycles");
    op(0, A_OVRCNT, 0);   chk(rd[31:0], 0, "no overrun while waiting");

    // ---- counter reads
    op(0, 7'd70, 0);      chk(rd, 64'hFFFF_FFFF_1000_0006, "read with copy returns counter");
    chk(n_copy, 1, "read with copy copies");
    chk(n_mark, 0, "read with copy does not mark busy");
    op(0, 7'd86, 0);      chk(rd, 64'hFFFF_FFFF_5000_0006, "read without copy returns shadow");
    chk({n_copy, n_stall}, 0, "no copy, no stall when idle");
    shd_busy = 1;
    op(0, 7'd86, 0);      chk(n_stall, 1, "read without copy stalls network when busy");
    op(0, 7'd70, 0);      chk(rd, 64'hFFFF_FFFF_5000_0006, "busy, no read wait: erroneous shadow data");
    chk(n_copy, 0, "busy: no copy");
    op(1, A_CSR, 64'h10);
    fork
      op(0, 7'd71, 0);
      begin repeat (5) @(posedge clk); #2 shd_busy = 0; end
    join
    chk(rd, 64'hFFFF_FFFF_1000_0007, "read with copy after waiting");
    chk(n_copy, 1, "copy after wait");

    // ---- test mode commands
    op(1, A_TS, 64'h5);   chk(n_tsload, 0, "timestamp not writable outside test mode");
    op(1, A_WAITCNT, 64'h99);
    op(0, A_WAITCNT, 0);  chk(rd[31:0], 0, "write clears wait counter");
    test_mode = 1;
    op(1, A_TS, 64'h5);   chk(n_tsload, 1, "timestamp write in test mode");
    op(1, A_WAITCNT, 64'h99);
    op(0, A_WAITCNT, 0);  chk(rd[31:0], 32'h99, "test mode load of wait counter");
    op(1, A_INC_OVR, 0);
    op(0, A_OVRCNT, 0);   chk(rd[31:0], 1, "test mode increment of overrun counter");
    op(1, A_NET_DIS, 0);  chk(net_en, 0, "network disabled");
    op(1, A_NET_EN, 0);   chk(net_en, 1, "network enabled");
    op(1, 7'd26, 64'h1357_9BDF);
    chk(pushed, {1'b0, {5{32'h1357_9BDF}}}, "direct FIFO write duplicates data");
    fifo_empty = 0;
    op(1, A_ADVANCE, 0);  chk({n_pop, n_free}, {32'd1, 32'd1}, "advance pops and frees");
    test_mode = 0;
    op(1, A_ADVANCE, 0);  chk(n_pop, 0, "advance ignored outside test mode");

    // ---- software reset
    op(1, A_SWRESET, 0);  chk(n_swrst, 1, "software reset strobe");
    op(0, A_FILTER, 0);   chk(rd[15:0], 0, "filter cleared by software reset");
    op(0, A_CSR, 0);      chk(rd[15:0], 16'h9400, "CSR cleared by software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
